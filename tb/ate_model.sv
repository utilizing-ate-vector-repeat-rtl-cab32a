// ate_model: behavioural model of the automatic test equipment, for
// testbenches only (not synthesizable, not part of the design).
//
// It has an instruction memory (imem) and a vector memory (vmem). Each
// vector holds every tester pin of the decompression logic (ate_vec_t).
// A rising edge on `start` executes imem from the start, one vector per
// clock, driving `vec` after each falling edge; `busy` is high from that
// edge until the program is done and imem has been emptied:
//   ATE_SEQ  vmem[addr .. addr+len-1] once;
//   ATE_RPT  the block vmem[addr .. addr+len-1] `count` times (vector
//            repeat). Bits outside `mask` are taken from a stream that
//            starts at vmem[saddr] and advances every cycle, which models
//            a tester that repeats only one pin group while the other pins
//            keep streaming.
// Statistics: instructions executed, repeat instructions, vectors applied.
// The vector memory size is vmem.size(); per-group storage is counted by
// the testbench that builds the program.
module ate_model
  import vr_ref_pkg::*;
(
  input  logic     clk,
  input  logic     start,
  output logic     busy,
  output ate_vec_t vec
);
  ate_vec_t   vmem[$];
  ate_instr_t imem[$];
  int n_instr = 0, n_repeat_instr = 0, n_applied = 0;

  initial begin
    vec  = '0;
    busy = 1'b0;
    forever begin
      @(posedge start);
      busy = 1'b1;
      foreach (imem[k]) begin
        ate_instr_t in;
        in = imem[k];
        n_instr++;
        if (in.op == ATE_RPT) n_repeat_instr++;
        if (in.op == ATE_SEQ) begin
          for (int i = 0; i < in.len; i++) begin
            @(negedge clk);
            vec = vmem[in.addr + i];
            n_applied++;
          end
        end else begin
          int sp;
          sp = in.saddr;
          for (int r = 0; r < in.count; r++) begin
            for (int i = 0; i < in.len; i++) begin
              @(negedge clk);
              vec = (vmem[in.addr + i] & in.mask) | (vmem[sp] & ~in.mask);
              if (in.mask != '1) sp++;
              n_applied++;
            end
          end
        end
      end
      @(negedge clk);
      vec = '0;
      imem.delete();
      busy = 1'b0;
    end
  end
endmodule
