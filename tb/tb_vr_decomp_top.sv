// tb_vr_decomp_top: end-to-end test of the decompression scheme on both
// kinds of tester, at the default sizes (20 chains of 35 cells).
//
// The testbench plays the tester and the encoding software. It generates
// clusters of random test cubes that share many specified bits, splits every
// specified position into common (all cubes agree) or unique (cubes
// conflict), and computes the tester data by solving the linear equations of
// symbolic models of the CSG and USG (vr_ref_pkg). It then applies the data
// and checks every specified bit of every cube in the scan chains.
//
// Repeat per pin group (default top): one CSG stream per cluster, replayed
// unchanged for each cube (vector repeat), plus one USG stream per cube;
// one cluster uses partition 1 (repeated data on the other pin group); one
// lowly-correlated cube is loaded with repeat disable set (CSG only).
// Repeat on all pins (MODE = ATE_RPA): the published example flow with three
// clusters A (2 cubes), B (3) and C (2); one USG seed serves A and C, a
// second serves B; each cube gets its cluster's CSG seed by vector repeat.
// The tester is modelled by ate_model: each cluster is one vector-repeat
// instruction (per pin group, or on all pins), and the testbench reports
// how many instructions and vector-memory words the test took, and the
// words behind each pin group (the partitions must balance them). A
// scoreboard checks each cube once its last scan shift is done. Every
// mechanism is counted and must occur at least once.
module tb_vr_decomp_top;
  import vr_pkg::*;
  import vr_ref_pkg::*;

  localparam int C = 20, L = 35, NP = C * L;
  localparam int G_PRE = 29;                 // preload cycles, about 86 / 3
  localparam int A_CSG_LD = 13, A_USG_LD = 25; // seed cycles: 78 / 6, 150 / 6

  typedef struct packed {
    logic [NP-1:0] spec;
    logic [NP-1:0] val;
  } cube_t;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- DUT, repeat per pin group (all defaults) ----------------
  ate_vec_t g_vec;
  logic g_rd_q;
  logic [C-1:0] g_chain_in, g_sel_unique, g_sout;
  logic [C-1:0][L-1:0] g_cells;

  logic g_go = 1'b0, g_busy;
  ate_model ate_g (.clk, .start(g_go), .busy(g_busy), .vec(g_vec));

  vr_decomp_top dut_g (
    .clk, .rst_n, .usg_start(g_vec.usg_start), .cube_start(g_vec.cube_start),
    .rd_bit(g_vec.rd_bit), .rd_pin(g_vec.rd_pin), .part(g_vec.part), .load(g_vec.load),
    .shift(g_vec.shift), .pins(g_vec.pins),
    .chain_in(g_chain_in), .sel_unique(g_sel_unique), .rd_q(g_rd_q), .sout(g_sout),
    .cells(g_cells));

  // ---------------- DUT, repeat on all pins ----------------
  ate_vec_t a_vec;
  logic a_rd_q;
  logic [C-1:0] a_chain_in, a_sel_unique, a_sout;
  logic [C-1:0][L-1:0] a_cells;

  logic a_go = 1'b0, a_busy;
  ate_model ate_a (.clk, .start(a_go), .busy(a_busy), .vec(a_vec));

  vr_decomp_top #(.MODE(ATE_RPA)) dut_a (
    .clk, .rst_n, .usg_start(a_vec.usg_start), .cube_start(a_vec.cube_start),
    .rd_bit(a_vec.rd_bit), .rd_pin(a_vec.rd_pin), .part(a_vec.part), .load(a_vec.load),
    .shift(a_vec.shift), .pins(a_vec.pins),
    .chain_in(a_chain_in), .sel_unique(a_sel_unique), .rd_q(a_rd_q), .sout(a_sout),
    .cells(a_cells));

  // ---------------- scoreboards: check each cube after its last shift ----------------
  typedef struct {
    cube_t         cb;
    logic [NP-1:0] common;
    bit            rd;
  } exp_t;
  exp_t g_exp[$], a_exp[$];
  int g_shifts = 0, a_shifts = 0;

  always @(posedge clk) begin
    if (g_vec.cube_start) g_shifts = 0;
    else if (g_vec.shift) g_shifts++;
    if (a_vec.cube_start) a_shifts = 0;
    else if (a_vec.shift) a_shifts++;
  end

  always @(negedge clk) begin
    if (g_shifts == L) begin
      g_shifts = 0;
      checks++;
      if (g_exp.size() == 0) failures++;
      else begin
        exp_t e;
        e = g_exp.pop_front();
        check_cells(g_cells, e.cb, e.common, e.rd, "rpg");
      end
    end
    if (a_shifts == L) begin
      a_shifts = 0;
      checks++;
      if (a_exp.size() == 0) failures++;
      else begin
        exp_t e;
        e = a_exp.pop_front();
        check_cells(a_cells, e.cb, e.common, e.rd, "rpa");
      end
    end
  end

  // execute the program in a tester's instruction memory
  task automatic g_run();
    g_go = 1'b1;
    wait (g_busy);
    g_go = 1'b0;
    wait (!g_busy);
    // the scoreboard checks the last cube on the edge where busy falls
    @(posedge clk);
    checks++;
    if (g_exp.size() != 0) failures++;
  endtask

  task automatic a_run();
    a_go = 1'b1;
    wait (a_busy);
    a_go = 1'b0;
    wait (!a_busy);
    // the scoreboard checks the last cube on the edge where busy falls
    @(posedge clk);
    checks++;
    if (a_exp.size() != 0) failures++;
  endtask

  // tester storage, in vectors, per pin group
  int g_rep_words = 0, g_stream_words = 0, g_plain_words = 0;
  // per-pin memory: words behind pins [2:0] and [5:3], with the partitions
  // used, and as they would be if every cluster used partition 0
  int g_grp_words[2] = '{0, 0}, g_grp_words_p0[2] = '{0, 0};
  int a_words = 0, a_plain_words = 0;

  // mechanism counters
  int n_common_bits = 0, n_unique_bits = 0, n_repeated_cubes = 0, n_part1_cubes = 0;
  int n_rd_cubes = 0, n_rpa_usg_seeds = 0, n_rpa_shared_seed_clusters = 0, n_cubes = 0;
  int n_solve_retries = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- cube generation and encoding ----------------
  function automatic int pick_free(ref bit used[NP]);
    int k;
    do k = $urandom_range(0, NP - 1); while (used[k]);
    used[k] = 1'b1;
    return k;
  endfunction

  // K cubes sharing ncom common positions (each cube leaves one unspecified
  // with probability 1/8) and nconf positions each cube specifies with
  // probability 1/2 with its own random value.
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
      for (int c = 0; c < k_cubes; c++) begin
        if ($urandom_range(0, 7) != 0 || c == 0) begin
          q[c].spec[pos] = 1'b1; q[c].val[pos] = v;
        end
      end
    end
    for (int n = 0; n < nconf; n++) begin
      pos = pick_free(used);
      for (int c = 0; c < k_cubes; c++) begin
        if ($urandom_range(0, 1) != 0) begin
          q[c].spec[pos] = 1'b1; q[c].val[pos] = 1'($urandom);
        end
      end
    end
  endfunction

  // a cube from a string of '0', '1' and 'x'; character k goes to scan
  // position base + k
  function automatic cube_t make_cube(string str, int base);
    cube_t cb;
    cb = '0;
    for (int k = 0; k < str.len(); k++) begin
      if (str[k] == "0" || str[k] == "1") begin
        cb.spec[base + k] = 1'b1;
        cb.val[base + k]  = (str[k] == "1");
      end
    end
    return cb;
  endfunction

  // number of specified unique-data bits of a cluster
  function automatic int unique_bits(cube_t q[$], logic [NP-1:0] conflict);
    int n;
    n = 0;
    foreach (q[c]) n += $countones(q[c].spec & conflict);
    return n;
  endfunction

  // classify: common[pos] (cc = 1, data cval), conflict[pos] (cc = 0)
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

  // check the scan cells of a loaded cube
  task automatic check_cells(input logic [C-1:0][L-1:0] cells, input cube_t cb,
                             input logic [NP-1:0] common, input bit rd, input string tag);
    int bad;
    bad = 0;
    for (int i = 0; i < C; i++) begin
      for (int p = 0; p < L; p++) begin
        int pos;
        pos = i * L + p;
        if (cb.spec[pos]) begin
          checks++;
          if (cells[i][p] !== cb.val[pos]) begin failures++; bad++; end
          if (rd || common[pos]) n_common_bits++; else n_unique_bits++;
        end
      end
    end
    n_cubes++;
    if (bad != 0) $display("%s: %0d specified bits wrong", tag, bad);
  endtask

  // ---------------- repeat per pin group ----------------
  localparam int GV = (G_PRE + L) * 3;

  // CSG equations for a cluster (rd = 0) or a single cube loaded with
  // repeat disable (rd = 1: data outputs only)
  function automatic bit g_solve_csg(logic [NP-1:0] common, logic [NP-1:0] conflict,
                                     logic [NP-1:0] cval, bit rd, output lin_t x);
    sym_decomp #(86, 3) s;
    lin_t a[$];
    bit b[$];
    s = new();
    for (int n = 0; n < G_PRE; n++) s.step(1, n * 3);
    for (int t = 0; t < L; t++) begin
      int p;
      p = L - 1 - t;
      for (int i = 0; i < C; i++) begin
        int pos;
        pos = i * L + p;
        if (common[pos]) begin
          a.push_back(s.out(i)); b.push_back(cval[pos]);
          if (!rd) begin a.push_back(s.out(C + i)); b.push_back(1'b1); end
        end else if (conflict[pos] && !rd) begin
          a.push_back(s.out(C + i)); b.push_back(1'b0);
        end
      end
      s.step(1, (G_PRE + t) * 3);
    end
    return gf2_solve(a, b, GV, x);
  endfunction

  function automatic bit g_solve_usg(cube_t cb, logic [NP-1:0] conflict, output lin_t x);
    sym_decomp #(27, 3) s;
    lin_t a[$];
    bit b[$];
    s = new();
    for (int n = 0; n < G_PRE; n++) s.step(1, n * 3);
    for (int t = 0; t < L; t++) begin
      int p;
      p = L - 1 - t;
      for (int i = 0; i < C; i++) begin
        int pos;
        pos = i * L + p;
        if (conflict[pos] && cb.spec[pos]) begin
          a.push_back(s.out(i)); b.push_back(cb.val[pos]);
        end
      end
      s.step(1, (G_PRE + t) * 3);
    end
    return gf2_solve(a, b, GV, x);
  endfunction

  localparam int G_LEN = 1 + G_PRE + L;   // vectors per cube

  // one cube's vectors: CSG part (controls and CSG pins) from cx, USG pins
  // from ux; returns the vector-memory address of the first one
  function automatic int g_put_cube(lin_t cx, lin_t ux, bit part, bit rd);
    int base;
    base = ate_g.vmem.size();
    for (int n = 0; n < G_LEN; n++) begin
      ate_vec_t v;
      logic [2:0] cbits, ubits;
      v = '0;
      v.part = part;
      if (n == 0) begin
        v.cube_start = 1'b1; v.rd_bit = rd;
      end else begin
        cbits = cx[(n-1)*3 +: 3];
        ubits = ux[(n-1)*3 +: 3];
        v.load  = (n - 1 < G_PRE);
        v.shift = (n - 1 >= G_PRE);
        v.pins  = part ? {cbits, ubits} : {ubits, cbits};
      end
      ate_g.vmem.push_back(v);
    end
    return base;
  endfunction

  // bits repeated in a pin-group repeat: all controls and the CSG pins
  function automatic ate_vec_t g_mask(bit part);
    ate_vec_t m;
    m = '1;
    m.pins = part ? 6'b000111 : 6'b111000;
    m.pins = ~m.pins;
    return m;
  endfunction

  task automatic g_cluster(input int k_cubes, input bit part, input cube_t given[$]);
    cube_t q[$];
    logic [NP-1:0] common, conflict, cval;
    lin_t cx;
    lin_t ux[$];
    bit ok;
    int tries;
    tries = 0;
    do begin
      ok = 1;
      if (given.size() != 0) q = given;
      else gen_cluster(k_cubes, 40, 8, q);
      classify(q, common, conflict, cval);
      ok = g_solve_csg(common, conflict, cval, 1'b0, cx);
      ux.delete();
      foreach (q[c]) begin
        lin_t u;
        if (!g_solve_usg(q[c], conflict, u)) ok = 0;
        ux.push_back(u);
      end
      if (!ok) n_solve_retries++;
      tries++;
    end while (!ok && tries < 10);
    checks++;
    if (!ok) begin failures++; return; end
    // one repeat instruction for the whole cluster: the CSG block is stored
    // once, the USG pins stream one block per cube
    begin
      ate_instr_t in;
      int blk, st;
      blk = g_put_cube(cx, '0, part, 1'b0);
      st = ate_g.vmem.size();
      foreach (q[c]) void'(g_put_cube('0, ux[c], part, 1'b0));
      in.op = ATE_RPT; in.addr = blk; in.len = G_LEN; in.count = q.size();
      in.mask = g_mask(part); in.saddr = st;
      ate_g.imem.push_back(in);
      foreach (q[c]) begin
        exp_t e;
        e.cb = q[c]; e.common = common; e.rd = 1'b0;
        g_exp.push_back(e);
        if (c > 0) n_repeated_cubes++;
        if (part) n_part1_cubes++;
      end
      g_rep_words += G_LEN;
      g_stream_words += q.size() * G_LEN;
      g_plain_words += q.size() * G_LEN;
      g_grp_words[part] += G_LEN;
      g_grp_words[!part] += q.size() * G_LEN;
      g_grp_words_p0[0] += G_LEN;
      g_grp_words_p0[1] += q.size() * G_LEN;
      g_run();
    end
  endtask

  task automatic g_lowcorr_cube();
    cube_t q[$];
    logic [NP-1:0] common, conflict, cval;
    lin_t cx, ux;
    bit ok;
    gen_cluster(1, 60, 0, q);
    classify(q, common, conflict, cval);
    ok = g_solve_csg(common, conflict, cval, 1'b1, cx);
    checks++;
    if (!ok) begin failures++; return; end
    for (int v = 0; v < MAXV; v++) ux[v] = 1'($urandom);
    begin
      ate_instr_t in;
      exp_t e;
      in.op = ATE_SEQ; in.addr = g_put_cube(cx, ux, 1'b0, 1'b1); in.len = G_LEN;
      in.count = 1; in.mask = '1; in.saddr = 0;
      ate_g.imem.push_back(in);
      e.cb = q[0]; e.common = common; e.rd = 1'b1;
      g_exp.push_back(e);
      g_rep_words += G_LEN; g_stream_words += G_LEN; g_plain_words += G_LEN;
      foreach (g_grp_words[i]) begin
        g_grp_words[i] += G_LEN;
        g_grp_words_p0[i] += G_LEN;
      end
      g_run();
    end
    checks++;
    if (g_rd_q !== 1'b1) failures++;
    n_rd_cubes++;
  endtask

  // ---------------- repeat on all pins ----------------
  localparam int AC_V = A_CSG_LD * 6, AU_V = A_USG_LD * 6;

  function automatic bit a_solve_csg(logic [NP-1:0] common, logic [NP-1:0] conflict,
                                     logic [NP-1:0] cval, bit rd, output lin_t x);
    sym_decomp #(78, 6) s;
    lin_t a[$];
    bit b[$];
    s = new();
    for (int n = 0; n < A_CSG_LD; n++) s.step(1, n * 6);
    for (int t = 0; t < L; t++) begin
      int p;
      p = L - 1 - t;
      for (int i = 0; i < C; i++) begin
        int pos;
        pos = i * L + p;
        if (common[pos]) begin
          a.push_back(s.out(i)); b.push_back(cval[pos]);
          if (!rd) begin a.push_back(s.out(C + i)); b.push_back(1'b1); end
        end else if (conflict[pos] && !rd) begin
          a.push_back(s.out(C + i)); b.push_back(1'b0);
        end
      end
      s.step(0, 0);
    end
    return gf2_solve(a, b, AC_V, x);
  endfunction

  // one USG seed for a list of cubes loaded in this order
  function automatic bit a_solve_usg(cube_t cubes[$], logic [NP-1:0] conflicts[$], output lin_t x);
    sym_decomp #(150, 6) s;
    lin_t a[$];
    bit b[$];
    s = new();
    for (int n = 0; n < A_USG_LD; n++) s.step(1, n * 6);
    foreach (cubes[c]) begin
      for (int t = 0; t < L; t++) begin
        int p;
        p = L - 1 - t;
        for (int i = 0; i < C; i++) begin
          int pos;
          pos = i * L + p;
          if (conflicts[c][pos] && cubes[c].spec[pos]) begin
            a.push_back(s.out(i)); b.push_back(cubes[c].val[pos]);
          end
        end
        s.step(0, 0);
      end
    end
    return gf2_solve(a, b, AU_V, x);
  endfunction

  // USG seed: usg_start, then A_USG_LD load vectors with rd_pin = 1
  task automatic a_seq_usg(input lin_t ux);
    ate_instr_t in;
    in.op = ATE_SEQ; in.addr = ate_a.vmem.size(); in.len = 1 + A_USG_LD;
    in.count = 1; in.mask = '1; in.saddr = 0;
    for (int n = 0; n <= A_USG_LD; n++) begin
      ate_vec_t v;
      v = '0;
      if (n == 0) v.usg_start = 1'b1;
      else begin v.load = 1'b1; v.rd_pin = 1'b1; v.pins = ux[(n-1)*6 +: 6]; end
      ate_a.vmem.push_back(v);
    end
    ate_a.imem.push_back(in);
    a_words += in.len; a_plain_words += in.len;
    n_rpa_usg_seeds++;
  endtask

  // a cluster's CSG seed and scan load, repeated on all pins for each cube
  // (count = 1 and rd = 1 for a lowly-correlated cube)
  task automatic a_rpt_cube(input lin_t cx, input bit rd, input cube_t q[$],
                            input logic [NP-1:0] common);
    ate_instr_t in;
    in.op = (q.size() > 1) ? ATE_RPT : ATE_SEQ;
    in.addr = ate_a.vmem.size(); in.len = 1 + A_CSG_LD + L;
    in.count = q.size(); in.mask = '1; in.saddr = 0;
    for (int n = 0; n < in.len; n++) begin
      ate_vec_t v;
      v = '0;
      if (n == 0) begin v.cube_start = 1'b1; v.rd_bit = rd; end
      else if (n <= A_CSG_LD) begin v.load = 1'b1; v.pins = cx[(n-1)*6 +: 6]; end
      else v.shift = 1'b1;   // pins carry nothing during the shift
      ate_a.vmem.push_back(v);
    end
    ate_a.imem.push_back(in);
    a_words += in.len; a_plain_words += q.size() * in.len;
    foreach (q[c]) begin
      exp_t e;
      e.cb = q[c]; e.common = common; e.rd = rd;
      a_exp.push_back(e);
      if (c > 0) n_repeated_cubes++;
    end
  endtask

  // clusters A, B, C; USG seed 1 serves A then C, seed 2 serves B
  task automatic a_flow(input cube_t ga[$], input cube_t gb[$], input cube_t gc[$]);
    cube_t qa[$], qb[$], qc[$];
    logic [NP-1:0] coma, cona, cva, comb, conb, cvb, comc, conc, cvc;
    lin_t xa, xb, xc, u1, u2;
    cube_t s1[$], s2[$];
    logic [NP-1:0] k1[$], k2[$];
    bit ok;
    int tries;
    tries = 0;
    do begin
      if (ga.size() != 0) begin
        qa = ga; qb = gb; qc = gc;
      end else begin
        gen_cluster(2, 25, 3, qa);
        gen_cluster(3, 25, 3, qb);
        gen_cluster(2, 25, 3, qc);
      end
      classify(qa, coma, cona, cva);
      classify(qb, comb, conb, cvb);
      classify(qc, comc, conc, cvc);
      ok = a_solve_csg(coma, cona, cva, 1'b0, xa);
      if (!a_solve_csg(comb, conb, cvb, 1'b0, xb)) ok = 0;
      if (!a_solve_csg(comc, conc, cvc, 1'b0, xc)) ok = 0;
      s1.delete(); k1.delete(); s2.delete(); k2.delete();
      foreach (qa[c]) begin s1.push_back(qa[c]); k1.push_back(cona); end
      foreach (qc[c]) begin s1.push_back(qc[c]); k1.push_back(conc); end
      foreach (qb[c]) begin s2.push_back(qb[c]); k2.push_back(conb); end
      if (!a_solve_usg(s1, k1, u1)) ok = 0;
      if (!a_solve_usg(s2, k2, u2)) ok = 0;
      if (!ok) n_solve_retries++;
      tries++;
    end while (!ok && tries < 10);
    checks++;
    if (!ok) begin failures++; return; end
    // tester program: seed 1 (A and C), A x2, C x2, seed 2 (B), B x3
    a_seq_usg(u1);
    a_rpt_cube(xa, 1'b0, qa, coma);
    a_rpt_cube(xc, 1'b0, qc, comc);
    n_rpa_shared_seed_clusters++;
    a_seq_usg(u2);
    a_rpt_cube(xb, 1'b0, qb, comb);
    // a lowly-correlated cube, CSG only
    begin
      cube_t ql[$];
      logic [NP-1:0] cml, cnl, cvl;
      lin_t xl;
      gen_cluster(1, 30, 0, ql);
      classify(ql, cml, cnl, cvl);
      checks++;
      if (!a_solve_csg(cml, cnl, cvl, 1'b1, xl)) begin failures++; return; end
      a_rpt_cube(xl, 1'b1, ql, cml);
      n_rd_cubes++;
    end
    begin
      int rpt0;
      rpt0 = ate_a.n_repeat_instr;
      a_run();
      // one repeat instruction per cluster
      checks++;
      if (ate_a.n_repeat_instr - rpt0 != 3) failures++;
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    begin
      cube_t none[$], f1[$], t_a[$], t_b[$], t_c[$];
      logic [NP-1:0] cm, cf, cv;
      // the eight-cube example cluster of the scheme's description,
      // on chain 5 cells 10..17: 2 common-data, 7 control, 40 unique bits
      f1.push_back(make_cube("0111101x", 5 * L + 10));
      f1.push_back(make_cube("0011101x", 5 * L + 10));
      f1.push_back(make_cube("0111100x", 5 * L + 10));
      f1.push_back(make_cube("0110011x", 5 * L + 10));
      f1.push_back(make_cube("00x1100x", 5 * L + 10));
      f1.push_back(make_cube("0110111x", 5 * L + 10));
      f1.push_back(make_cube("x111011x", 5 * L + 10));
      f1.push_back(make_cube("x111111x", 5 * L + 10));
      classify(f1, cm, cf, cv);
      checks++;
      if ($countones(cm) != 2 || $countones(cm | cf) != 7 || unique_bits(f1, cf) != 40) failures++;
      g_cluster(8, 1'b0, f1);
      g_cluster(4, 1'b0, none);
      g_cluster(3, 1'b1, none);
      g_lowcorr_cube();
      // the seven-cube, three-cluster example for the all-pins logic,
      // on chain 3 cells 20..24: 2, 6 and 2 unique bits
      t_a.push_back(make_cube("0x11x", 3 * L + 20));
      t_a.push_back(make_cube("1x11x", 3 * L + 20));
      t_b.push_back(make_cube("1110x", 3 * L + 20));
      t_b.push_back(make_cube("10100", 3 * L + 20));
      t_b.push_back(make_cube("11110", 3 * L + 20));
      t_c.push_back(make_cube("0x000", 3 * L + 20));
      t_c.push_back(make_cube("1x000", 3 * L + 20));
      classify(t_a, cm, cf, cv); checks++; if (unique_bits(t_a, cf) != 2) failures++;
      classify(t_b, cm, cf, cv); checks++; if (unique_bits(t_b, cf) != 6) failures++;
      classify(t_c, cm, cf, cv); checks++; if (unique_bits(t_c, cf) != 2) failures++;
      a_flow(t_a, t_b, t_c);
      a_flow(none, none, none);
    end
    $display("cubes=%0d common_bits=%0d unique_bits=%0d repeated_cubes=%0d part1_cubes=%0d",
             n_cubes, n_common_bits, n_unique_bits, n_repeated_cubes, n_part1_cubes);
    $display("repeat_disabled_cubes=%0d rpa_usg_seeds=%0d rpa_clusters_sharing_seed=%0d retries=%0d",
             n_rd_cubes, n_rpa_usg_seeds, n_rpa_shared_seed_clusters, n_solve_retries);
    $display("rpg tester: %0d instructions (%0d repeats), vector memory %0d words in the repeated pin group and %0d in the streamed group, against %0d each without repeat",
             ate_g.n_instr, ate_g.n_repeat_instr, g_rep_words, g_stream_words, g_plain_words);
    $display("rpa tester: %0d instructions (%0d repeats), vector memory %0d words, against %0d without repeat",
             ate_a.n_instr, ate_a.n_repeat_instr, a_words, a_plain_words);
    // pin partitions spread the streamed words over both pin groups, so the
    // fuller group needs less memory than with partition 0 alone
    $display("rpg per-pin memory: %0d and %0d words (pins [2:0], [5:3]); %0d and %0d with one partition",
             g_grp_words[0], g_grp_words[1], g_grp_words_p0[0], g_grp_words_p0[1]);
    checks++;
    if ((g_grp_words[0] > g_grp_words[1] ? g_grp_words[0] : g_grp_words[1]) >=
        (g_grp_words_p0[0] > g_grp_words_p0[1] ? g_grp_words_p0[0] : g_grp_words_p0[1]))
      failures++;
    // every queued cube was checked
    checks++;
    if (g_exp.size() != 0 || a_exp.size() != 0) failures++;
    checks++;
    if (n_common_bits == 0 || n_unique_bits == 0 || n_repeated_cubes == 0 || n_part1_cubes == 0 ||
        n_rd_cubes < 2 || n_rpa_usg_seeds < 2 || n_rpa_shared_seed_clusters == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
