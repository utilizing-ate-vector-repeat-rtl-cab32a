// vr_wl_harness: testbench helper that runs the decompression logic in one
// benchmark configuration (tester mode, chain count and length, CSG and USG
// sizes) through an encoded test run and counts what it checks.
//
// It plays the tester and the encoder: random clusters of test cubes are
// generated, split into common and unique positions, and the tester data is
// found by solving the linear equations of symbolic CSG/USG models
// (vr_ref_pkg). In repeat-per-pin-group mode it loads a 4-cube cluster on
// partition 0, a 3-cube cluster on partition 1 and one repeat-disabled cube;
// in all-pins mode one USG seed serves clusters A (2 cubes) and C (2), a
// second serves B (3), then one repeat-disabled cube. Every specified bit
// is checked in the scan chains. Starts on `go`, raises `done` at the end.
// Cluster sizes scale with the decompressor sizes so that the equation
// systems stay solvable: about CSG_N/2 (pin group) or CSG_N/3 (all pins)
// common positions per cluster, and a few conflicting positions.
module vr_wl_harness
  import vr_pkg::*;
  import vr_ref_pkg::*;
#(
  parameter ate_mode_e MODE   = ATE_RPG,
  parameter int        CHAINS = 20,
  parameter int        LEN    = 35,
  parameter int        CSG_N  = 86,
  parameter int        USG_N  = 27
) (
  input  logic clk,
  input  logic rst_n,
  input  logic go,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_common_bits,
  output int   n_unique_bits,
  output int   n_repeated_cubes,
  output int   n_rd_cubes,
  output int   n_retries
);
  localparam int NP    = CHAINS * LEN;
  localparam int IN_G  = 3;                           // CSG / USG pins, pin-group mode
  localparam int IN_A  = 6;                           // shared pins, all-pins mode
  localparam int PRE   = (CSG_N + IN_G - 1) / IN_G;   // preload cycles, pin-group mode
  localparam int GV    = (PRE + LEN) * IN_G;
  localparam int CLD   = (CSG_N + IN_A - 1) / IN_A;   // CSG seed cycles, all-pins mode
  localparam int ULD   = (USG_N + IN_A - 1) / IN_A;   // USG seed cycles, all-pins mode
  localparam int NCOM  = (MODE == ATE_RPG) ? CSG_N / 2 : CSG_N / 3;
  localparam int NCONF = (MODE == ATE_RPG) ? 8 : (USG_N / 16 > 2 ? USG_N / 16 : 2);

  typedef struct packed {
    logic [NP-1:0] spec;
    logic [NP-1:0] val;
  } cube_t;

  logic usg_start, cube_start, rd_bit, rd_pin, load, shift, rd_q;
  logic [0:0] part;
  logic [5:0] pins;
  logic [CHAINS-1:0] chain_in, sel_unique, sout;
  logic [CHAINS-1:0][LEN-1:0] cells;

  vr_decomp_top #(.MODE(MODE), .CHAINS(CHAINS), .CHAIN_LEN(LEN), .CSG_N(CSG_N), .USG_N(USG_N)) dut (
    .clk, .rst_n, .usg_start, .cube_start, .rd_bit, .rd_pin, .part, .load, .shift, .pins,
    .chain_in, .sel_unique, .rd_q, .sout, .cells);

  function automatic int pick_free(ref bit used[NP]);
    int k;
    do k = $urandom_range(0, NP - 1); while (used[k]);
    used[k] = 1'b1;
    return k;
  endfunction

  function automatic void gen_cluster(int k_cubes, int ncom, int nconf, output cube_t q[$]);
    bit used[NP];
    int pos;
    bit v;
    foreach (used[i]) used[i] = 1'b0;
    q.delete();
    for (int c = 0; c < k_cubes; c++) q.push_back('0);
    for (int n = 0; n < ncom; n++) begin
      pos = pick_free(used);
      v = 1'($urandom);
      for (int c = 0; c < k_cubes; c++)
        if ($urandom_range(0, 7) != 0 || c == 0) begin q[c].spec[pos] = 1'b1; q[c].val[pos] = v; end
    end
    for (int n = 0; n < nconf; n++) begin
      pos = pick_free(used);
      for (int c = 0; c < k_cubes; c++)
        if ($urandom_range(0, 1) != 0) begin q[c].spec[pos] = 1'b1; q[c].val[pos] = 1'($urandom); end
    end
  endfunction

  function automatic void classify(cube_t q[$], output logic [NP-1:0] common,
                                   output logic [NP-1:0] conflict, output logic [NP-1:0] cval);
    common = '0; conflict = '0; cval = '0;
    for (int pos = 0; pos < NP; pos++) begin
      bit any0, any1;
      any0 = 0; any1 = 0;
      foreach (q[c]) if (q[c].spec[pos]) begin
        if (q[c].val[pos]) any1 = 1; else any0 = 1;
      end
      if (any0 && any1) conflict[pos] = 1'b1;
      else if (any0 || any1) begin common[pos] = 1'b1; cval[pos] = any1; end
    end
  endfunction

  task automatic check_cells(input cube_t cb, input logic [NP-1:0] common, input bit rd);
    for (int i = 0; i < CHAINS; i++) begin
      for (int p = 0; p < LEN; p++) begin
        int pos;
        pos = i * LEN + p;
        if (cb.spec[pos]) begin
          checks++;
          if (cells[i][p] !== cb.val[pos]) begin
            failures++;
            if (failures <= 4)
              $display("mismatch: mode %0d, %0d chains x %0d, CSG %0d, USG %0d: chain %0d cell %0d common=%0b rd=%0b",
                       MODE, CHAINS, LEN, CSG_N, USG_N, i, p, common[pos], rd);
          end
          if (rd || common[pos]) n_common_bits++; else n_unique_bits++;
        end
      end
    end
  endtask

  // CSG equations; `inj_in_shift` selects continuous injection (pin group)
  // or seed-then-expand (all pins)
  function automatic bit solve_csg(logic [NP-1:0] common, logic [NP-1:0] conflict,
                                   logic [NP-1:0] cval, bit rd, output lin_t x);
    lin_t a[$];
    bit b[$];
    if (MODE == ATE_RPG) begin
      sym_decomp #(CSG_N, IN_G) s;
      s = new();
      for (int n = 0; n < PRE; n++) s.step(1, n * IN_G);
      for (int t = 0; t < LEN; t++) begin
        for (int i = 0; i < CHAINS; i++) begin
          int pos;
          pos = i * LEN + LEN - 1 - t;
          if (common[pos]) begin
            a.push_back(s.out(i)); b.push_back(cval[pos]);
            if (!rd) begin a.push_back(s.out(CHAINS + i)); b.push_back(1'b1); end
          end else if (conflict[pos] && !rd) begin
            a.push_back(s.out(CHAINS + i)); b.push_back(1'b0);
          end
        end
        s.step(1, (PRE + t) * IN_G);
      end
      return gf2_solve(a, b, GV, x);
    end else begin
      sym_decomp #(CSG_N, IN_A) s;
      s = new();
      for (int n = 0; n < CLD; n++) s.step(1, n * IN_A);
      for (int t = 0; t < LEN; t++) begin
        for (int i = 0; i < CHAINS; i++) begin
          int pos;
          pos = i * LEN + LEN - 1 - t;
          if (common[pos]) begin
            a.push_back(s.out(i)); b.push_back(cval[pos]);
            if (!rd) begin a.push_back(s.out(CHAINS + i)); b.push_back(1'b1); end
          end else if (conflict[pos] && !rd) begin
            a.push_back(s.out(CHAINS + i)); b.push_back(1'b0);
          end
        end
        s.step(0, 0);
      end
      return gf2_solve(a, b, CLD * IN_A, x);
    end
  endfunction

  // USG equations for the cubes it serves, in load order
  function automatic bit solve_usg(cube_t cubes[$], logic [NP-1:0] conflicts[$], output lin_t x);
    lin_t a[$];
    bit b[$];
    if (MODE == ATE_RPG) begin
      sym_decomp #(USG_N, IN_G) s;
      s = new();
      for (int n = 0; n < PRE; n++) s.step(1, n * IN_G);
      for (int t = 0; t < LEN; t++) begin
        for (int i = 0; i < CHAINS; i++) begin
          int pos;
          pos = i * LEN + LEN - 1 - t;
          if (conflicts[0][pos] && cubes[0].spec[pos]) begin
            a.push_back(s.out(i)); b.push_back(cubes[0].val[pos]);
          end
        end
        s.step(1, (PRE + t) * IN_G);
      end
      return gf2_solve(a, b, GV, x);
    end else begin
      sym_decomp #(USG_N, IN_A) s;
      s = new();
      for (int n = 0; n < ULD; n++) s.step(1, n * IN_A);
      foreach (cubes[c]) begin
        for (int t = 0; t < LEN; t++) begin
          for (int i = 0; i < CHAINS; i++) begin
            int pos;
            pos = i * LEN + LEN - 1 - t;
            if (conflicts[c][pos] && cubes[c].spec[pos]) begin
              a.push_back(s.out(i)); b.push_back(cubes[c].val[pos]);
            end
          end
          s.step(0, 0);
        end
      end
      return gf2_solve(a, b, ULD * IN_A, x);
    end
  endfunction

  // ---- repeat per pin group ----
  task automatic g_load_cube(input lin_t cx, input lin_t ux, input bit p, input bit rd);
    @(negedge clk);
    cube_start = 1; rd_bit = rd; part = p;
    @(negedge clk);
    cube_start = 0;
    for (int n = 0; n < PRE + LEN; n++) begin
      logic [2:0] cb, ub;
      cb = cx[n*3 +: 3];
      ub = ux[n*3 +: 3];
      load = (n < PRE); shift = (n >= PRE);
      pins = p ? {cb, ub} : {ub, cb};
      @(negedge clk);
    end
    load = 0; shift = 0;
  endtask

  task automatic g_cluster(input int k_cubes, input bit p);
    cube_t q[$], one[$];
    logic [NP-1:0] common, conflict, cval;
    logic [NP-1:0] cl[$];
    lin_t cx;
    lin_t ux[$];
    bit ok;
    int tries;
    tries = 0;
    do begin
      gen_cluster(k_cubes, NCOM, NCONF, q);
      classify(q, common, conflict, cval);
      ok = solve_csg(common, conflict, cval, 1'b0, cx);
      ux.delete();
      foreach (q[c]) begin
        lin_t u;
        one.delete(); one.push_back(q[c]);
        cl.delete(); cl.push_back(conflict);
        if (!solve_usg(one, cl, u)) ok = 0;
        ux.push_back(u);
      end
      if (!ok) n_retries++;
      tries++;
    end while (!ok && tries < 10);
    checks++;
    if (!ok) begin failures++; return; end
    foreach (q[c]) begin
      g_load_cube(cx, ux[c], p, 1'b0);
      check_cells(q[c], common, 1'b0);
      if (c > 0) n_repeated_cubes++;
    end
  endtask

  // ---- repeat on all pins ----
  task automatic a_load_usg(input lin_t ux);
    @(negedge clk);
    usg_start = 1;
    @(negedge clk);
    usg_start = 0;
    for (int n = 0; n < ULD; n++) begin
      load = 1; rd_pin = 1; pins = ux[n*6 +: 6];
      @(negedge clk);
    end
    load = 0; rd_pin = 0;
  endtask

  task automatic a_load_cube(input lin_t cx, input bit rd);
    @(negedge clk);
    cube_start = 1; rd_bit = rd;
    @(negedge clk);
    cube_start = 0;
    for (int n = 0; n < CLD; n++) begin
      load = 1; rd_pin = 0; pins = cx[n*6 +: 6];
      @(negedge clk);
    end
    load = 0;
    for (int n = 0; n < LEN; n++) begin
      shift = 1; pins = 6'($urandom);
      @(negedge clk);
    end
    shift = 0;
  endtask

  task automatic a_flow();
    cube_t qa[$], qb[$], qc[$], s1[$], s2[$];
    logic [NP-1:0] coma, cona, cva, comb, conb, cvb, comc, conc, cvc;
    logic [NP-1:0] k1[$], k2[$];
    lin_t xa, xb, xc, u1, u2;
    bit ok;
    int tries;
    tries = 0;
    do begin
      gen_cluster(2, NCOM, NCONF, qa);
      gen_cluster(3, NCOM, NCONF, qb);
      gen_cluster(2, NCOM, NCONF, qc);
      classify(qa, coma, cona, cva);
      classify(qb, comb, conb, cvb);
      classify(qc, comc, conc, cvc);
      ok = solve_csg(coma, cona, cva, 1'b0, xa);
      if (!solve_csg(comb, conb, cvb, 1'b0, xb)) ok = 0;
      if (!solve_csg(comc, conc, cvc, 1'b0, xc)) ok = 0;
      s1.delete(); k1.delete(); s2.delete(); k2.delete();
      foreach (qa[c]) begin s1.push_back(qa[c]); k1.push_back(cona); end
      foreach (qc[c]) begin s1.push_back(qc[c]); k1.push_back(conc); end
      foreach (qb[c]) begin s2.push_back(qb[c]); k2.push_back(conb); end
      if (!solve_usg(s1, k1, u1)) ok = 0;
      if (!solve_usg(s2, k2, u2)) ok = 0;
      if (!ok) n_retries++;
      tries++;
    end while (!ok && tries < 10);
    checks++;
    if (!ok) begin failures++; return; end
    a_load_usg(u1);
    foreach (qa[c]) begin
      a_load_cube(xa, 1'b0); check_cells(qa[c], coma, 1'b0);
      if (c > 0) n_repeated_cubes++;
    end
    foreach (qc[c]) begin
      a_load_cube(xc, 1'b0); check_cells(qc[c], comc, 1'b0);
      if (c > 0) n_repeated_cubes++;
    end
    a_load_usg(u2);
    foreach (qb[c]) begin
      a_load_cube(xb, 1'b0); check_cells(qb[c], comb, 1'b0);
      if (c > 0) n_repeated_cubes++;
    end
  endtask

  task automatic lowcorr_cube();
    cube_t q[$];
    logic [NP-1:0] common, conflict, cval;
    lin_t cx, ux;
    gen_cluster(1, NCOM, 0, q);
    classify(q, common, conflict, cval);
    checks++;
    if (!solve_csg(common, conflict, cval, 1'b1, cx)) begin failures++; return; end
    for (int v = 0; v < MAXV; v++) ux[v] = 1'($urandom);
    if (MODE == ATE_RPG) g_load_cube(cx, ux, 1'b0, 1'b1);
    else a_load_cube(cx, 1'b1);
    check_cells(q[0], common, 1'b1);
    checks++;
    if (rd_q !== 1'b1) failures++;
    n_rd_cubes++;
  endtask

  initial begin
    {usg_start, cube_start, rd_bit, rd_pin, load, shift, part, pins} = '0;
    done = 0; checks = 0; failures = 0;
    n_common_bits = 0; n_unique_bits = 0; n_repeated_cubes = 0; n_rd_cubes = 0; n_retries = 0;
    wait (go);
    if (MODE == ATE_RPG) begin
      g_cluster(4, 1'b0);
      g_cluster(3, 1'b1);
    end else begin
      a_flow();
    end
    lowcorr_cube();
    done = 1;
  end
endmodule
