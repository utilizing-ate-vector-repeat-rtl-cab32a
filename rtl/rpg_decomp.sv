// rpg_decomp: decompression logic for a tester with vector repeat per pin
// group.
//
// Two sequential linear decompressors work side by side. The CSG (common
// sequence generator) is fed from the tester pins that run under vector
// repeat (rv_in): one stored stream, repeated once per test cube of a
// cluster, produces each chain's common data and common control. The USG
// (unique sequence generator) is fed from the pins that stream normally
// (nrv_in) and produces each chain's unique data, different for every cube.
// chain_select merges them: common control 1 picks the common data, 0 the
// unique data, and the repeat-disable bit forces the common (CSG) data for a
// lowly-correlated cube. The CSG is much larger than the USG because most
// specified bits of a cluster are common.
//
// Timing, per test cube (the tester drives the controls):
//   cube_start  one cycle: both decompressors clear, the repeat-disable
//               flip-flop takes rd_bit
//   load        cycles in which both decompressors take tester data and
//               advance while the scan chains hold (preloading the state)
//   shift       cycles in which both take tester data and advance, and
//               chain_in is shifted into the scan chains
// CSG outputs [CHAINS-1:0] are the common data, [2*CHAINS-1:CHAINS] the
// common control. Clearing both at every cube, and injecting data during
// shifts as well as loads, are this design's choices.
module rpg_decomp #(
  parameter int CHAINS = 20,  // published s13207 configuration
  parameter int CSG_N  = 86,  // CSG size, published for s13207 (r.p.g.)
  parameter int USG_N  = 27,  // USG size, published for s13207 (r.p.g.)
  parameter int CSG_CH = 3,   // repeated-vector pins (six-pin example of the scheme)
  parameter int USG_CH = 3    // non-repeated-vector pins (six-pin example of the scheme)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cube_start,
  input  logic              rd_bit,
  input  logic              load,
  input  logic              shift,
  input  logic [CSG_CH-1:0] rv_in,
  input  logic [USG_CH-1:0] nrv_in,
  output logic [CHAINS-1:0] chain_in,
  output logic [CHAINS-1:0] sel_unique,
  output logic              rd_q
);

  logic [2*CHAINS-1:0] csg_out;
  logic [CHAINS-1:0]   usg_out;
  logic                run;

  assign run = load | shift;

  seq_lin_decomp #(.N(CSG_N), .IN_CH(CSG_CH), .OUT_CH(2 * CHAINS)) u_csg (
    .clk, .rst_n, .clear(cube_start), .adv(run), .inj(run), .din(rv_in), .dout(csg_out)
  );

  seq_lin_decomp #(.N(USG_N), .IN_CH(USG_CH), .OUT_CH(CHAINS)) u_usg (
    .clk, .rst_n, .clear(cube_start), .adv(run), .inj(run), .din(nrv_in), .dout(usg_out)
  );

  chain_select #(.CHAINS(CHAINS)) u_sel (
    .clk, .rst_n, .cube_start, .rd_bit,
    .cdata(csg_out[CHAINS-1:0]), .cctrl(csg_out[2*CHAINS-1:CHAINS]), .udata(usg_out),
    .rd_q, .sel_unique, .chain_in
  );

  a_one_phase: assert property (@(posedge clk) disable iff (!rst_n)
    !(load && shift) && !(cube_start && (load || shift)))
    else $error("rpg_decomp: cube_start, load and shift must not overlap");

endmodule
