// tb_wth_mem: self-checking test of the weight/threshold memories.
// Fills both memories over the configuration bus with random words (and
// interleaves writes aimed at another layer id, which must be ignored), then
// reads every address back and checks the one-cycle read latency.
module tb_wth_mem;
  import archeq_pkg::*;
  localparam int PE = 4, SIMD = 2, WDEPTH = 12, NGRP = 3;
  localparam int WW = PE*SIMD*WBITS;
  logic clk = 0;
  always #5 clk = ~clk;
  cfg_t cfg;
  logic [$clog2(WDEPTH)-1:0] w_raddr;
  logic [WW-1:0] w_rdata;
  logic [$clog2(NGRP)-1:0] t_raddr;
  logic [PE-1:0][NTH*TBITS-1:0] t_rdata;
  logic [WW-1:0] wref [WDEPTH];
  logic [NTH*TBITS-1:0] tref [NGRP][PE];
  int checks = 0, failures = 0;

  wth_mem #(.LAYER_ID(3'd2), .PE(PE), .SIMD(SIMD), .WDEPTH(WDEPTH), .NGRP(NGRP)) dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [2:0] layer, input logic is_th, input int addr, input logic [63:0] data);
    @(negedge clk);
    cfg.we = 1; cfg.layer = layer; cfg.is_th = is_th; cfg.addr = CFG_AW'(addr); cfg.data = data;
    @(negedge clk);
    cfg.we = 0;
  endtask

  initial begin
    cfg = '0; w_raddr = '0; t_raddr = '0;
    for (int a = 0; a < WDEPTH; a++) begin
      wref[a] = WW'({$urandom, $urandom});
      wr(3'd2, 0, a, 64'(wref[a]));
      wr(3'd1, 0, a, {$urandom, $urandom});     // other layer: ignored
    end
    for (int g = 0; g < NGRP; g++)
      for (int p = 0; p < PE; p++) begin
        tref[g][p] = (NTH*TBITS)'({$urandom, $urandom});
        wr(3'd2, 1, g*PE+p, 64'(tref[g][p]));
        wr(3'd5, 1, g*PE+p, {$urandom, $urandom});
      end
    for (int a = 0; a < WDEPTH; a++) begin
      @(negedge clk);
      w_raddr = a[$clog2(WDEPTH)-1:0];
      t_raddr = 2'(a % NGRP);
      @(negedge clk);
      w_raddr = '0;
      checks++;
      if (w_rdata !== wref[a]) begin
        failures++; $display("weight %0d: got %h exp %h", a, w_rdata, wref[a]);
      end
      for (int p = 0; p < PE; p++) begin
        checks++;
        if (t_rdata[p] !== tref[a % NGRP][p]) begin
          failures++; $display("th %0d/%0d mismatch", a % NGRP, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
