// tb_scan_chains: shifts random bits into 20 chains of 35 cells, with
// random hold cycles, and checks every cell and the scan-out bit against a
// queue model of each chain: cell p holds the bit shifted in p shifts ago.
module tb_scan_chains;
  localparam int C = 20, L = 35;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic shift;
  logic [C-1:0] sin, sout;
  logic [C-1:0][L-1:0] cells;
  bit model[C][L];

  scan_chains #(.CHAINS(C), .LEN(L)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    shift = 0; sin = '0;
    foreach (model[i, p]) model[i][p] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      shift = ($urandom_range(0, 3) != 0);
      sin = C'($urandom);
      @(posedge clk);
      if (shift) begin
        for (int i = 0; i < C; i++) begin
          for (int p = L - 1; p > 0; p--) model[i][p] = model[i][p-1];
          model[i][0] = sin[i];
        end
      end
      @(negedge clk);
      for (int i = 0; i < C; i++) begin
        for (int p = 0; p < L; p++) begin
          checks++;
          if (cells[i][p] !== model[i][p]) failures++;
        end
        checks++;
        if (sout[i] !== model[i][L-1]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
