// tb_vr_full: the decompression logic exactly as configured by default
// (repeat per pin group, 20 chains of 35 cells, 86-bit CSG, 27-bit USG,
// two pin partitions), taken through complete operations.
//
// The testbench plays the tester and the encoding software: it generates
// clusters of random test cubes, classifies each specified position as
// common or unique, solves the linear equations of symbolic CSG and USG
// models (vr_ref_pkg) for the tester data, applies it with one CSG stream
// replayed for every cube of a cluster, and checks every specified bit in
// the scan chains. The tester is the ate_model: each cluster is one
// vector-repeat instruction on the CSG pin group while the USG pins stream,
// and a scoreboard checks each cube after its last scan shift. One cluster
// uses partition 1, which must lower the words needed behind the fuller pin
// group, and one lowly-correlated cube is loaded with repeat disable set;
// each of these must occur.
module tb_vr_full;
  import vr_pkg::*;
  import vr_ref_pkg::*;

  localparam int C = 20, L = 35, NP = C * L;
  localparam int G_PRE = 29;                 // preload cycles, about 86 / 3

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

  // ---------------- scoreboards: check each cube after its last shift ----------------
  typedef struct {
    cube_t         cb;
    logic [NP-1:0] common;
    bit            rd;
  } exp_t;
  exp_t g_exp[$];
  int g_shifts = 0;

  always @(posedge clk) begin
    if (g_vec.cube_start) g_shifts = 0;
    else if (g_vec.shift) g_shifts++;
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

  // tester storage, in vectors, per pin group
  int g_rep_words = 0, g_stream_words = 0, g_plain_words = 0;
  // per-pin memory: words behind pins [2:0] and [5:3], with the partitions
  // used, and as they would be if every cluster used partition 0
  int g_grp_words[2] = '{0, 0}, g_grp_words_p0[2] = '{0, 0};

  // mechanism counters
  int n_common_bits = 0, n_unique_bits = 0, n_repeated_cubes = 0, n_part1_cubes = 0;
  int n_rd_cubes = 0, n_cubes = 0;
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

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    begin
      cube_t none[$], f1[$];
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
    end
    $display("cubes=%0d common_bits=%0d unique_bits=%0d repeated_cubes=%0d part1_cubes=%0d",
             n_cubes, n_common_bits, n_unique_bits, n_repeated_cubes, n_part1_cubes);
    $display("repeat_disabled_cubes=%0d retries=%0d", n_rd_cubes, n_solve_retries);
    $display("rpg tester: %0d instructions (%0d repeats), vector memory %0d words in the repeated pin group and %0d in the streamed group, against %0d each without repeat",
             ate_g.n_instr, ate_g.n_repeat_instr, g_rep_words, g_stream_words, g_plain_words);
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
    if (g_exp.size() != 0) failures++;
    checks++;
    if (n_common_bits == 0 || n_unique_bits == 0 || n_repeated_cubes == 0 || n_part1_cubes == 0 ||
        n_rd_cubes == 0) failures++;
    // one repeat instruction per cluster
    checks++;
    if (ate_g.n_repeat_instr != 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
