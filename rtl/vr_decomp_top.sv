// vr_decomp_top: test-data decompression that combines tester vector repeat
// with linear decompression, feeding the scan chains of a circuit.
//
// The test cubes are grouped into clusters. Each scan bit position of a
// cluster is either common (all cubes agree), unique (cubes conflict) or
// unused. A common sequence generator (CSG) produces the common data and a
// per-position common control; since these are the same for every cube of
// the cluster, the tester stores the CSG's input stream once and replays it
// with a single vector-repeat instruction. A unique sequence generator
// (USG) produces the few conflicting bits of each cube. Per chain, the
// common control picks common or unique data; a repeat-disable bit makes a
// lowly-correlated cube come from the CSG alone.
//
// MODE selects the decompression logic for the kind of tester:
//   ATE_RPG (default) repeat per pin group: pins[CSG_CH-1:0] (after the
//           pin_rotator for partition `part`) run under repeat and feed the
//           CSG, the next USG_CH pins stream normally into the USG; both
//           take data in load and shift cycles (rpg_decomp). usg_start and
//           rd_pin are unused.
//   ATE_RPA repeat on all pins only: all pins feed either decompressor,
//           chosen by rd_pin during load cycles; one USG seed serves many
//           cubes (rpa_decomp). `part` is unused.
// Controls are driven by the tester each clock: usg_start / cube_start
// (one-cycle clears, cube_start also samples rd_bit), load (seed cycles,
// chains hold) and shift (chains shift chain_in). After CHAIN_LEN shifts the
// cube is in `cells`. Default sizes are those given for s13207 (20 chains,
// CSG 86 / USG 27 bits for repeat per pin group, 78 / 150 for repeat on all
// pins); the chain length, pin counts and partition count are assumptions.
module vr_decomp_top
  import vr_pkg::*;
#(
  parameter ate_mode_e MODE      = ATE_RPG,
  parameter int        CHAINS    = 20,
  parameter int        CHAIN_LEN = 35,
  parameter int        PINS      = 6,
  parameter int        CSG_CH    = 3,
  parameter int        USG_CH    = 3,
  parameter int        PARTS     = 2,
  parameter int        CSG_N     = (MODE == ATE_RPG) ? 86 : 78,
  parameter int        USG_N     = (MODE == ATE_RPG) ? 27 : 150,
  localparam int       PW        = (PARTS > 1) ? $clog2(PARTS) : 1
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             usg_start,
  input  logic                             cube_start,
  input  logic                             rd_bit,
  input  logic                             rd_pin,
  input  logic [PW-1:0]                    part,
  input  logic                             load,
  input  logic                             shift,
  input  logic [PINS-1:0]                  pins,
  output logic [CHAINS-1:0]                chain_in,
  output logic [CHAINS-1:0]                sel_unique,
  output logic                             rd_q,
  output logic [CHAINS-1:0]                sout,
  output logic [CHAINS-1:0][CHAIN_LEN-1:0] cells
);

  if (MODE == ATE_RPG) begin : g_rpg
    logic [CSG_CH-1:0] rv;
    logic [USG_CH-1:0] nrv;

    pin_rotator #(.PINS(PINS), .CSG_CH(CSG_CH), .USG_CH(USG_CH), .PARTS(PARTS)) u_rot (
      .part, .pins, .rv, .nrv
    );

    rpg_decomp #(.CHAINS(CHAINS), .CSG_N(CSG_N), .USG_N(USG_N),
                 .CSG_CH(CSG_CH), .USG_CH(USG_CH)) u_dec (
      .clk, .rst_n, .cube_start, .rd_bit, .load, .shift,
      .rv_in(rv), .nrv_in(nrv), .chain_in, .sel_unique, .rd_q
    );
  end else begin : g_rpa
    rpa_decomp #(.CHAINS(CHAINS), .CSG_N(CSG_N), .USG_N(USG_N), .PINS(PINS)) u_dec (
      .clk, .rst_n, .usg_start, .cube_start, .rd_bit, .rd_pin, .load, .shift,
      .pins, .chain_in, .sel_unique, .rd_q
    );
  end

  scan_chains #(.CHAINS(CHAINS), .LEN(CHAIN_LEN)) u_chains (
    .clk, .rst_n, .shift, .sin(chain_in), .sout, .cells
  );

endmodule
