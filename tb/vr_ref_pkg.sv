// vr_ref_pkg: reference models for the testbenches.
//
// ref_decomp is a bit-by-bit model of a sequential linear decompressor,
// written from its definition rather than from the RTL: an array of N
// stages, the feedback is the XOR of the tapped stages and enters stage 0,
// every other stage takes its lower neighbour, then tester bit c is XORed
// into stage inj_stage(c). Output j is the XOR of the three phase-shifter
// stages. Only the structural constants (tap mask, injection and
// phase-shifter positions) are taken from vr_pkg.
//
// sym_decomp is the same decompressor simulated symbolically: every stage
// holds a GF(2) linear combination of tester bits (bit v of the vector is
// tester bit v), so each output is an equation in the tester bits.
// gf2_solve solves such a system by Gaussian elimination, filling free
// tester bits at random; this is how the tester data for a test cube is
// computed (one equation per specified bit).
//
// ate_vec_t / ate_instr_t describe the tester program run by ate_model.
package vr_ref_pkg;

  // one tester vector: every tester pin of the decompression logic
  typedef struct packed {
    logic       usg_start;
    logic       cube_start;
    logic       rd_bit;
    logic       rd_pin;
    logic       part;
    logic       load;
    logic       shift;
    logic [5:0] pins;
  } ate_vec_t;

  typedef enum logic {
    ATE_SEQ = 1'b0,   // apply len vectors from vector memory once
    ATE_RPT = 1'b1    // apply a block of len vectors `count` times
  } ate_op_e;

  // One instruction. For ATE_RPT, the bits set in `mask` come from the
  // repeated block at `addr` on every pass; the other bits (the pin group
  // that is not repeated) stream from vector memory starting at `saddr`.
  // mask = all ones is a repeat on all pins.
  typedef struct {
    ate_op_e  op;
    int       addr;
    int       len;
    int       count;
    ate_vec_t mask;
    int       saddr;
  } ate_instr_t;

  localparam int MAXV = 512;
  typedef bit [MAXV-1:0] lin_t;

  class sym_decomp #(int N = 8, int IN = 1);
    lin_t s[N];
    bit   tap[N];

    function new();
      logic [vr_pkg::MAX_LFSR-1:0] m;
      m = vr_pkg::lfsr_taps(N);
      for (int k = 0; k < N; k++) tap[k] = m[k];
      clear();
    endfunction

    function void clear();
      for (int k = 0; k < N; k++) s[k] = '0;
    endfunction

    // one step; with inj, tester bit (vbase + c) enters at channel c
    function void step(bit inj, int vbase);
      lin_t ns[N];
      lin_t fb;
      fb = '0;
      for (int k = 0; k < N; k++) if (tap[k]) fb ^= s[k];
      ns[0] = fb;
      for (int k = 1; k < N; k++) ns[k] = s[k-1];
      if (inj) for (int c = 0; c < IN; c++) ns[vr_pkg::inj_stage(c, IN, N)][vbase + c] ^= 1'b1;
      s = ns;
    endfunction

    function lin_t out(int j);
      return s[vr_pkg::ps_tap(j, 0, N)] ^ s[vr_pkg::ps_tap(j, 1, N)] ^ s[vr_pkg::ps_tap(j, 2, N)];
    endfunction
  endclass

  // Solve A x = b over GF(2) for nv unknowns. Returns 0 if inconsistent.
  function automatic bit gf2_solve(lin_t a[$], bit b[$], int nv, output lin_t x);
    int   piv_col[$];
    int   row;
    lin_t m[$];
    bit   r[$];
    m = a; r = b;
    row = 0;
    for (int col = 0; col < nv && row < m.size(); col++) begin
      int p;
      p = -1;
      for (int i = row; i < m.size(); i++) if (m[i][col]) begin p = i; break; end
      if (p < 0) continue;
      begin
        lin_t tm; bit tr;
        tm = m[p]; m[p] = m[row]; m[row] = tm;
        tr = r[p]; r[p] = r[row]; r[row] = tr;
      end
      for (int i = 0; i < m.size(); i++) begin
        if (i != row && m[i][col]) begin
          m[i] ^= m[row];
          r[i] ^= r[row];
        end
      end
      piv_col.push_back(col);
      row++;
    end
    for (int i = row; i < m.size(); i++) if (r[i]) return 1'b0;
    // free unknowns random, pivots from their rows
    x = '0;
    for (int v = 0; v < nv; v++) x[v] = 1'($urandom);
    for (int i = 0; i < row; i++) x[piv_col[i]] = 1'b0;
    for (int i = row - 1; i >= 0; i--) begin
      bit val;
      lin_t rest;
      rest = m[i];
      rest[piv_col[i]] = 1'b0;
      val = r[i] ^ (^(rest & x));
      x[piv_col[i]] = val;
    end
    return 1'b1;
  endfunction

  class ref_decomp #(int N = 8, int IN = 1, int OUT = 1);
    bit s[N];
    bit tap[N];

    function new();
      logic [vr_pkg::MAX_LFSR-1:0] m;
      m = vr_pkg::lfsr_taps(N);
      for (int k = 0; k < N; k++) tap[k] = m[k];
      clear();
    endfunction

    function void clear();
      for (int k = 0; k < N; k++) s[k] = 1'b0;
    endfunction

    function void step(bit inj, bit [IN-1:0] d);
      bit ns[N];
      bit fb;
      fb = 1'b0;
      for (int k = 0; k < N; k++) if (tap[k]) fb ^= s[k];
      ns[0] = fb;
      for (int k = 1; k < N; k++) ns[k] = s[k-1];
      if (inj) for (int c = 0; c < IN; c++) ns[vr_pkg::inj_stage(c, IN, N)] ^= d[c];
      s = ns;
    endfunction

    function bit out(int j);
      return s[vr_pkg::ps_tap(j, 0, N)] ^ s[vr_pkg::ps_tap(j, 1, N)] ^ s[vr_pkg::ps_tap(j, 2, N)];
    endfunction

    function bit [OUT-1:0] outs();
      bit [OUT-1:0] o;
      for (int j = 0; j < OUT; j++) o[j] = out(j);
      return o;
    endfunction
  endclass

endpackage
