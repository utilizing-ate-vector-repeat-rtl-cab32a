// seq_lin_decomp: sequential linear decompressor, used both as the common
// sequence generator (CSG) and as the unique sequence generator (USG).
//
// An N-stage Fibonacci LFSR shifts towards stage N-1; its feedback (the XOR
// of the stages selected by TAPS) enters stage 0. Each of the IN_CH tester
// inputs is XORed into one stage (vr_pkg::inj_stage) on cycles where `inj`
// is high, so the state, and every output, is a linear (GF(2)) function of
// the tester bits received since the last `clear`. The OUT_CH outputs come
// from a phase shifter: output j is the XOR of three stages (vr_pkg::ps_tap).
// Because everything is linear, the tester data for a test cube is found by
// solving one linear equation per specified output bit; the number of
// tester bits needed depends on how many bits are specified, not on how many
// outputs or cycles are produced.
//
// Interface and timing (all synchronous to clk, active-low async reset):
//   clear  zero the state (wins over adv); starts a new seed / stream
//   adv    advance the LFSR one step this cycle (low = hold, the functional
//          equivalent of gating the decompressor's clock)
//   inj    XOR din into the injection stages on this step (only with adv)
//   dout   phase-shifter outputs of the current state (combinational)
// The decompressor's structure (LFSR with injection plus phase shifter) is
// the usual one for this kind of decompressor; the scheme only requires it
// to be linear and independent of the test set. Sizes, polynomial and taps
// are parameters.
module seq_lin_decomp
  import vr_pkg::*;
#(
  parameter int N      = 86,   // LFSR stages (published s13207 CSG, repeat per pin group)
  parameter int IN_CH  = 3,    // tester channels feeding it
  parameter int OUT_CH = 40,   // outputs (CSG: 2 per scan chain)
  parameter logic [N-1:0] TAPS = lfsr_taps(N)[N-1:0]
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              adv,
  input  logic              inj,
  input  logic [IN_CH-1:0]  din,
  output logic [OUT_CH-1:0] dout
);

  logic [N-1:0] state, nxt;

  always_comb begin
    nxt = {state[N-2:0], ^(state & TAPS)};
    if (inj) begin
      for (int c = 0; c < IN_CH; c++) begin
        nxt[inj_stage(c, IN_CH, N)] ^= din[c];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     state <= '0;
    else if (clear) state <= '0;
    else if (adv)   state <= nxt;
  end

  always_comb begin
    for (int j = 0; j < OUT_CH; j++) begin
      dout[j] = state[ps_tap(j, 0, N)] ^ state[ps_tap(j, 1, N)] ^ state[ps_tap(j, 2, N)];
    end
  end

endmodule
