// pin_rotator: on-chip reconfiguration that spreads the repeated (common)
// data over all tester pins, for testers with a separate vector memory
// behind each pin.
//
// With a repeat-per-pin-group tester, the pins that carry the repeated CSG
// stream need one stored copy per cluster, while the pins that carry the
// USG stream need one per test cube, so the USG pins fill their memory
// first. The test set is therefore split into PARTS partitions, and each
// partition uses a different group of pins for the repeated data. `part`
// names the partition being applied: the pins are rotated by
// part*PINS/PARTS positions, then the first CSG_CH rotated pins drive the
// CSG and the next USG_CH drive the USG. With part = 0 the first CSG_CH
// pins go to the CSG (the arrangement without partitioning).
//
// Purely combinational: one multiplexer per decompressor input. The
// published description puts the reconfiguration multiplexers at the scan
// chains; doing the swap at the decompressor inputs is this design's own
// equivalent choice, since it exchanges which tester pins feed which
// decompressor.
module pin_rotator #(
  parameter int PINS   = 6,   // tester pins (six-pin example of the scheme)
  parameter int CSG_CH = 3,   // pins carrying repeated vectors
  parameter int USG_CH = 3,   // pins carrying non-repeated vectors
  parameter int PARTS  = 2,   // partitions (2-way and 4-way are evaluated for the scheme)
  localparam int PW    = (PARTS > 1) ? $clog2(PARTS) : 1
) (
  input  logic [PW-1:0]     part,
  input  logic [PINS-1:0]   pins,
  output logic [CSG_CH-1:0] rv,
  output logic [USG_CH-1:0] nrv
);

  localparam int STEP = PINS / PARTS;

  logic [PINS-1:0] rot;

  always_comb begin
    for (int k = 0; k < PINS; k++) begin
      rot[k] = pins[(k + int'(part) * STEP) % PINS];
    end
    rv  = rot[CSG_CH-1:0];
    nrv = rot[CSG_CH+USG_CH-1:CSG_CH];
  end

  initial begin
    assert (CSG_CH + USG_CH <= PINS) else $error("pin_rotator: more channels than pins");
    assert (PINS % PARTS == 0)       else $error("pin_rotator: PINS must divide into PARTS");
  end

endmodule
