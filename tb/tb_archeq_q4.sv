// tb_archeq_q4: end-to-end test of the "ArchE-Q-4" configuration: the
// default accelerator with 4 instead of 8 PEs in XVAU-1 and XVAU-2, three
// frames. The frame interval must be 17,900 cycles or less, i.e. at least
// 5,586 frames/s at 100 MHz, the rate published for this
// configuration. The test body is in tb_archeq_run.svh.
module tb_archeq_q4;
  import archeq_pkg::*;
  `include "tb_ref.svh"
  localparam int NFR = 3;
  localparam int MAX_INTERVAL = 17900;
  localparam int PE1 = 4, PE2 = 4;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, in_valid, in_ready, in_bit, beam_valid, beam_ready;
  cfg_t cfg;
  logic [5:0] beam_idx;
  acc_t beam_score;

  archeq_top #(.PE1(PE1), .PE2(PE2)) dut (.*);

  `include "tb_archeq_run.svh"

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: %0d results", nres);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
