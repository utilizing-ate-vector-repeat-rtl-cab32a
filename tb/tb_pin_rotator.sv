// tb_pin_rotator: checks the partition pin assignment. With 6 pins, 3 for
// the repeated stream and 3 for the streamed one, and 2 partitions:
// partition 0 sends pins 0-2 to the CSG and 3-5 to the USG, partition 1
// the other way round. A second instance with 4 partitions of 8 pins
// (2 + 2 channels) checks the rotation by two pins per partition.
module tb_pin_rotator;
  int checks = 0, failures = 0;

  logic [0:0] part2;
  logic [5:0] pins6;
  logic [2:0] rv3, nrv3;
  pin_rotator #(.PINS(6), .CSG_CH(3), .USG_CH(3), .PARTS(2)) dut2 (
    .part(part2), .pins(pins6), .rv(rv3), .nrv(nrv3));

  logic [1:0] part4;
  logic [7:0] pins8;
  logic [1:0] rv2, nrv2;
  pin_rotator #(.PINS(8), .CSG_CH(2), .USG_CH(2), .PARTS(4)) dut4 (
    .part(part4), .pins(pins8), .rv(rv2), .nrv(nrv2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      pins6 = 6'($urandom); part2 = 1'($urandom);
      pins8 = 8'($urandom); part4 = 2'($urandom);
      #1;
      checks++;
      if (part2 == 0) begin
        if (rv3 !== pins6[2:0] || nrv3 !== pins6[5:3]) failures++;
      end else begin
        if (rv3 !== pins6[5:3] || nrv3 !== pins6[2:0]) failures++;
      end
      checks++;
      case (part4)
        2'd0: if (rv2 !== pins8[1:0] || nrv2 !== pins8[3:2]) failures++;
        2'd1: if (rv2 !== pins8[3:2] || nrv2 !== pins8[5:4]) failures++;
        2'd2: if (rv2 !== pins8[5:4] || nrv2 !== pins8[7:6]) failures++;
        default: if (rv2 !== pins8[7:6] || nrv2 !== pins8[1:0]) failures++;
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
