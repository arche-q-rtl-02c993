// tb_archeq_top: end-to-end test of the whole accelerator at its default
// size ("ArchE-Q-8": 20x20 grid, PEs 8/8/2/32/16, 16/16/32 conv channels,
// FC 128->64->64), four frames. The frame interval must be 13,700 cycles or
// less, i.e. at least 7,300 frames/s at 100 MHz. The test body is in
// tb_archeq_run.svh.
module tb_archeq_top;
  import archeq_pkg::*;
  `include "tb_ref.svh"
  localparam int NFR = 4;
  localparam int MAX_INTERVAL = 13700;
  localparam int PE1 = 8, PE2 = 8;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, in_valid, in_ready, in_bit, beam_valid, beam_ready;
  cfg_t cfg;
  logic [5:0] beam_idx;
  acc_t beam_score;

  archeq_top dut (.*);

  `include "tb_archeq_run.svh"

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: %0d results", nres);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
