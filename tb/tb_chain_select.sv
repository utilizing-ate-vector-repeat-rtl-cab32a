// tb_chain_select: checks the per-chain selection. For random common data,
// common control and unique data, each chain must get the common data when
// its control bit is 1 and the unique data when it is 0, unless the
// repeat-disable bit sampled at the last cube_start is 1, in which case all
// chains get the common data. Also checks that rd_q only changes on
// cube_start.
module tb_chain_select;
  localparam int C = 20;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic cube_start, rd_bit, rd_q;
  logic [C-1:0] cdata, cctrl, udata, sel_unique, chain_in;
  bit exp_rd;
  int n_rd1 = 0, n_unique = 0, n_common = 0;

  chain_select #(.CHAINS(C)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {cube_start, rd_bit, cdata, cctrl, udata} = '0;
    exp_rd = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      cube_start = ($urandom_range(0, 7) == 0);
      rd_bit = $urandom_range(0, 1) != 0;
      cdata = C'($urandom); cctrl = C'($urandom); udata = C'($urandom);
      @(posedge clk);
      if (cube_start) exp_rd = rd_bit;
      @(negedge clk);
      cdata = C'($urandom); cctrl = C'($urandom); udata = C'($urandom);
      #1;
      checks++;
      if (rd_q !== exp_rd) failures++;
      for (int i = 0; i < C; i++) begin
        bit e;
        bit use_u;
        use_u = !exp_rd && !cctrl[i];
        e = use_u ? udata[i] : cdata[i];
        if (use_u) n_unique++; else n_common++;
        checks++;
        if (chain_in[i] !== e || sel_unique[i] !== use_u) failures++;
      end
      if (exp_rd) n_rd1++;
    end
    checks++;
    if (n_rd1 == 0 || n_unique == 0 || n_common == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
