// tb_rpa_decomp: checks the all-pins decompression logic cycle by cycle
// against reference models of its CSG (78 stages) and USG (150 stages),
// both on the same 6 pins. In load cycles rd_pin = 1 must load the USG and
// hold the CSG, rd_pin = 0 the reverse; in shift cycles both run without
// input. Also counts that the USG state is carried across several CSG seeds
// (its clear comes only from usg_start).
module tb_rpa_decomp;
  import vr_ref_pkg::*;
  localparam int C = 20;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic usg_start, cube_start, rd_bit, rd_pin, load, shift, rd_q;
  logic [5:0] pins;
  logic [C-1:0] chain_in, sel_unique;

  rpa_decomp dut (.*);

  ref_decomp #(78, 6, 2 * C) csg;
  ref_decomp #(150, 6, C)    usg;
  bit exp_rd;
  int n_unique = 0, n_common = 0, n_rd = 0, n_usg_load = 0, n_csg_load = 0;
  int cubes_since_usg = 0, max_cubes_per_usg = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    csg = new(); usg = new(); exp_rd = 0;
    {usg_start, cube_start, rd_bit, rd_pin, load, shift, pins} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      int r;
      r = $urandom_range(0, 39);
      usg_start  = (r == 0);
      cube_start = (r == 1 || r == 2);
      load  = (r >= 3 && r <= 14);
      shift = (r >= 15 && r <= 37);
      rd_pin = ($urandom_range(0, 2) == 0);
      rd_bit = ($urandom_range(0, 3) == 0);
      pins = 6'($urandom);
      @(posedge clk);
      if (usg_start) begin
        usg.clear();
        cubes_since_usg = 0;
      end
      if (cube_start) begin
        csg.clear(); exp_rd = rd_bit;
        cubes_since_usg++;
        if (cubes_since_usg > max_cubes_per_usg) max_cubes_per_usg = cubes_since_usg;
      end
      if (load && rd_pin)  begin usg.step(1, pins); n_usg_load++; end
      if (load && !rd_pin) begin csg.step(1, pins); n_csg_load++; end
      if (shift) begin csg.step(0, pins); usg.step(0, pins); end
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
    if (n_unique == 0 || n_common == 0 || n_rd == 0 || n_usg_load == 0 || n_csg_load == 0
        || max_cubes_per_usg < 2) failures++;
    $display("unique=%0d common=%0d rd=%0d usg_loads=%0d csg_loads=%0d max_cubes_per_usg_seed=%0d",
             n_unique, n_common, n_rd, n_usg_load, n_csg_load, max_cubes_per_usg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
