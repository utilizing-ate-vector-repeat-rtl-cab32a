// tb_seq_lin_decomp: checks the sequential linear decompressor against a
// bit-level reference model, at the CSG size of the per-pin-group logic
// (86 stages, 3 inputs, 40 outputs) and at the USG size of the all-pins
// logic (150 stages, 6 inputs, 20 outputs). Random sequences of clear,
// advance, inject and hold are applied and every output is compared every
// cycle. It also checks linearity: from a cleared state, the outputs for
// the XOR of two input streams equal the XOR of the outputs for each.
module tb_seq_lin_decomp;
  import vr_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // instance A: 86 stages, 3 in, 40 out
  logic a_clear, a_adv, a_inj;
  logic [2:0]  a_din;
  logic [39:0] a_dout;
  seq_lin_decomp #(.N(86), .IN_CH(3), .OUT_CH(40)) dut_a (
    .clk, .rst_n, .clear(a_clear), .adv(a_adv), .inj(a_inj), .din(a_din), .dout(a_dout));

  // instance B: 150 stages, 6 in, 20 out
  logic b_clear, b_adv, b_inj;
  logic [5:0]  b_din;
  logic [19:0] b_dout;
  seq_lin_decomp #(.N(150), .IN_CH(6), .OUT_CH(20)) dut_b (
    .clk, .rst_n, .clear(b_clear), .adv(b_adv), .inj(b_inj), .din(b_din), .dout(b_dout));

  ref_decomp #(86, 3, 40)  ra;
  ref_decomp #(150, 6, 20) rb;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp();
    checks++;
    if (a_dout !== ra.outs()) begin
      failures++;
      if (failures < 10) $display("A mismatch t=%0t dut=%h ref=%h", $time, a_dout, ra.outs());
    end
    checks++;
    if (b_dout !== rb.outs()) begin
      failures++;
      if (failures < 10) $display("B mismatch t=%0t dut=%h ref=%h", $time, b_dout, rb.outs());
    end
  endtask

  // run a stream of L cycles (inject+advance) from a cleared state on instance A
  task automatic run_stream_a(input bit [2:0] st[], output bit [39:0] res[]);
    res = new[st.size()];
    @(negedge clk); a_clear = 1; a_adv = 0; a_inj = 0;
    @(negedge clk); a_clear = 0;
    foreach (st[t]) begin
      a_adv = 1; a_inj = 1; a_din = st[t];
      @(negedge clk);
      res[t] = a_dout;
    end
    a_adv = 0; a_inj = 0;
  endtask

  initial begin
    bit [2:0]  s1[], s2[], s3[];
    bit [39:0] o1[], o2[], o3[];
    int holds = 0, clears = 0;
    ra = new();
    rb = new();
    {a_clear, a_adv, a_inj, a_din} = '0;
    {b_clear, b_adv, b_inj, b_din} = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    cmp();
    // random operation
    for (int t = 0; t < 3000; t++) begin
      logic [3:0] r;
      r = 4'($urandom);
      a_clear = (r == 0); a_adv = r[1] | r[2]; a_inj = r[3]; a_din = 3'($urandom);
      r = 4'($urandom);
      b_clear = (r == 1); b_adv = r[0] | r[2]; b_inj = r[3]; b_din = 6'($urandom);
      @(posedge clk);
      if (a_clear) begin ra.clear(); clears++; end
      else if (a_adv) ra.step(a_inj, a_din);
      else holds++;
      if (b_clear) rb.clear();
      else if (b_adv) rb.step(b_inj, b_din);
      @(negedge clk);
      cmp();
    end
    checks++;
    if (holds == 0 || clears == 0) failures++;
    // linearity: outputs(s1 ^ s2) == outputs(s1) ^ outputs(s2)
    for (int rep = 0; rep < 5; rep++) begin
      s1 = new[60]; s2 = new[60]; s3 = new[60];
      foreach (s1[t]) begin
        s1[t] = 3'($urandom); s2[t] = 3'($urandom); s3[t] = s1[t] ^ s2[t];
      end
      run_stream_a(s1, o1);
      run_stream_a(s2, o2);
      run_stream_a(s3, o3);
      foreach (o3[t]) begin
        checks++;
        if (o3[t] !== (o1[t] ^ o2[t])) failures++;
      end
      // the outputs must not stay all zero (the decompressor does expand data)
      checks++;
      if (o1[59] == '0 && o1[40] == '0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
