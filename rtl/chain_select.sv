// chain_select: repeat-disable flip-flop and the per-scan-chain selectors
// that merge the common and the unique sequence into the scan chains.
//
// For each scan chain i the CSG supplies a common-data bit cdata[i] and a
// common-control bit cctrl[i], the USG a unique-data bit udata[i]. The MUX
// select of chain i is NOR(cctrl[i], rd_q): select 0 passes the common data
// (CSG), select 1 the unique data (USG). So a bit position with common
// control 1 takes the common data and one with common control 0 the unique
// data, as in the encoding of a test-cube cluster. When the repeat-disable
// flip-flop rd_q is 1 (a lowly-correlated test cube), every select is 0 and
// the chains are loaded by the CSG alone, like a conventional linear
// decompressor, whatever the common control says.
//
// Timing: rd_q is loaded from rd_bit on the cycle `cube_start` is high (the
// start of each test cube) and holds until the next cube_start. chain_in is
// combinational from the decompressor outputs and rd_q.
module chain_select #(
  parameter int CHAINS = 20   // number of scan chains (published s13207 configuration)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cube_start,
  input  logic              rd_bit,
  input  logic [CHAINS-1:0] cdata,
  input  logic [CHAINS-1:0] cctrl,
  input  logic [CHAINS-1:0] udata,
  output logic              rd_q,
  output logic [CHAINS-1:0] sel_unique,
  output logic [CHAINS-1:0] chain_in
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          rd_q <= 1'b0;
    else if (cube_start) rd_q <= rd_bit;
  end

  always_comb begin
    for (int i = 0; i < CHAINS; i++) begin
      sel_unique[i] = ~(cctrl[i] | rd_q);
      chain_in[i]   = sel_unique[i] ? udata[i] : cdata[i];
    end
  end

endmodule
