// tb_rpg_decomp: checks the per-pin-group decompression logic cycle by
// cycle against reference models of its CSG (86 stages, 3 inputs) and USG
// (27 stages, 3 inputs). Random sequences of cube_start / load / shift /
// idle cycles with random repeated and non-repeated pin data are applied.
// chain_in must equal, per chain, the CSG common data where the common
// control is 1 or the repeat-disable bit is set, else the USG unique data.
module tb_rpg_decomp;
  import vr_ref_pkg::*;
  localparam int C = 20;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic cube_start, rd_bit, load, shift, rd_q;
  logic [2:0] rv_in, nrv_in;
  logic [C-1:0] chain_in, sel_unique;

  rpg_decomp dut (.*);

  ref_decomp #(86, 3, 2 * C) csg;
  ref_decomp #(27, 3, C)     usg;
  bit exp_rd;
  int n_unique = 0, n_common = 0, n_rd = 0, n_idle = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    csg = new(); usg = new(); exp_rd = 0;
    {cube_start, rd_bit, load, shift, rv_in, nrv_in} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      int r;
      r = $urandom_range(0, 19);
      cube_start = (r == 0);
      load  = (r >= 1 && r <= 5);
      shift = (r >= 6 && r <= 17);
      rd_bit = ($urandom_range(0, 3) == 0);
      rv_in = 3'($urandom); nrv_in = 3'($urandom);
      @(posedge clk);
      if (cube_start) begin csg.clear(); usg.clear(); exp_rd = rd_bit; end
      else if (load || shift) begin csg.step(1, rv_in); usg.step(1, nrv_in); end
      else n_idle++;
      @(negedge clk);
      #1;
      for (int i = 0; i < C; i++) begin
        bit cd, cc, ud, e;
        cd = csg.out(i); cc = csg.out(C + i); ud = usg.out(i);
        e = (cc || exp_rd) ? cd : ud;
        if (exp_rd) n_rd++; else if (cc) n_common++; else n_unique++;
        checks++;
        if (chain_in[i] !== e || sel_unique[i] !== !(cc || exp_rd)) failures++;
      end
      checks++;
      if (rd_q !== exp_rd) failures++;
    end
    checks++;
    if (n_unique == 0 || n_common == 0 || n_rd == 0 || n_idle == 0) failures++;
    $display("unique=%0d common=%0d repeat_disabled=%0d", n_unique, n_common, n_rd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
