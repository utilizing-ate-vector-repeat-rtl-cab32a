// rpa_decomp: decompression logic for a tester whose vector repeat covers
// all pins or none.
//
// All PINS tester pins are shared by the two sequential linear
// decompressors, and the tester's repeat-disable pin (rd_pin) decides which
// one takes them: while rd_pin is 1 the USG is loaded with a non-repeated
// seed and the CSG is held (its clock is, in effect, gated); while rd_pin
// is 0 the CSG is loaded, through vector repeat, and the USG is held, so
// the USG keeps its state across the CSG seeds. One USG seed carries the
// unique data of several test cubes, possibly of several clusters: after a
// USG seed the tester sends the CSG seed of the first cluster n times and of
// the next cluster m-n times, each followed by a scan load, and the USG runs
// on through all of those scan loads. During scan shifts both decompressors
// run freely (no injection), so each cube's bits are the expansion of the
// seeds. The USG is large here (150 bits for s13207 against 27
// in the per-pin-group logic) because one seed serves many cubes.
//
// Timing (controls driven by the tester):
//   usg_start   one cycle: clear the USG before a new USG seed
//   cube_start  one cycle: clear the CSG, load the repeat-disable flip-flop
//               from rd_bit
//   load        seed cycle: the decompressor chosen by rd_pin injects the
//               pins and advances, the other holds, the chains hold
//   shift       scan cycle: both advance without input, chains shift
// Clear pulses, seed-then-expand operation and free-running during the
// shift are this design's own choices.
module rpa_decomp #(
  parameter int CHAINS = 20,   // published s13207 configuration
  parameter int CSG_N  = 78,   // CSG size, published for s13207 (r.p.a.)
  parameter int USG_N  = 150,  // USG size, published for s13207 (r.p.a.)
  parameter int PINS   = 6     // tester pins (six-pin example of the scheme)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              usg_start,
  input  logic              cube_start,
  input  logic              rd_bit,
  input  logic              rd_pin,
  input  logic              load,
  input  logic              shift,
  input  logic [PINS-1:0]   pins,
  output logic [CHAINS-1:0] chain_in,
  output logic [CHAINS-1:0] sel_unique,
  output logic              rd_q
);

  logic [2*CHAINS-1:0] csg_out;
  logic [CHAINS-1:0]   usg_out;
  logic                csg_inj, usg_inj;

  assign csg_inj = load & ~rd_pin;
  assign usg_inj = load &  rd_pin;

  seq_lin_decomp #(.N(CSG_N), .IN_CH(PINS), .OUT_CH(2 * CHAINS)) u_csg (
    .clk, .rst_n, .clear(cube_start), .adv(csg_inj | shift), .inj(csg_inj),
    .din(pins), .dout(csg_out)
  );

  seq_lin_decomp #(.N(USG_N), .IN_CH(PINS), .OUT_CH(CHAINS)) u_usg (
    .clk, .rst_n, .clear(usg_start), .adv(usg_inj | shift), .inj(usg_inj),
    .din(pins), .dout(usg_out)
  );

  chain_select #(.CHAINS(CHAINS)) u_sel (
    .clk, .rst_n, .cube_start, .rd_bit,
    .cdata(csg_out[CHAINS-1:0]), .cctrl(csg_out[2*CHAINS-1:CHAINS]), .udata(usg_out),
    .rd_q, .sel_unique, .chain_in
  );

  a_one_phase: assert property (@(posedge clk) disable iff (!rst_n)
    !(load && shift) && !((cube_start || usg_start) && (load || shift)))
    else $error("rpa_decomp: start pulses, load and shift must not overlap");

endmodule
