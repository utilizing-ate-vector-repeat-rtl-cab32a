// scan_chains: the scan chains of the circuit under test, as the
// decompressor sees them.
//
// CHAINS shift registers of LEN cells each. On a cycle with `shift` high,
// every chain takes its decompressor bit sin[i] into cell 0 and moves each
// cell one place on; cell LEN-1 falls out on sout[i]. After LEN shifts,
// cell p of chain i holds the bit that entered on shift LEN-1-p. All cells
// are visible on `cells` so that a loaded test cube can be read back. The
// capture of circuit responses belongs to the circuit under test and is not
// modelled. The number of chains is the published one; the length is this
// design's assumption.
module scan_chains #(
  parameter int CHAINS = 20,  // published s13207 configuration
  parameter int LEN    = 35   // 700 scan inputs of s13207 / 20 chains (assumed)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       shift,
  input  logic [CHAINS-1:0]          sin,
  output logic [CHAINS-1:0]          sout,
  output logic [CHAINS-1:0][LEN-1:0] cells
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cells <= '0;
    end else if (shift) begin
      for (int i = 0; i < CHAINS; i++) begin
        cells[i] <= {cells[i][LEN-2:0], sin[i]};
      end
    end
  end

  always_comb begin
    for (int i = 0; i < CHAINS; i++) sout[i] = cells[i][LEN-1];
  end

endmodule
