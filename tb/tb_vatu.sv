// tb_vatu: self-checking test of the vector arithmetic and threshold unit.
// Two instances share the stimulus: a CAA unit with thresholds (2-bit
// activations out) and a SAC unit without thresholds (raw sums out). Weights
// and thresholds are loaded over the configuration bus; then runs of random
// length are issued back to back or with gaps, the operand vector following
// its step by one cycle. Each result is compared with a sum computed here and
// must appear exactly 3 cycles after the run's last step was issued.
module tb_vatu;
  import archeq_pkg::*;
  localparam int PE = 4, SIMD = 2, WDEPTH = 8, NGRP = 2;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  cfg_t cfg;
  logic in_valid, in_first, in_last;
  logic [2:0] in_waddr;
  logic [0:0] in_grp;
  logic [SIMD*ABITS-1:0] in_x;
  logic a_valid, b_valid;
  logic [PE*ABITS-1:0] a_res;
  logic [PE*ACC_W-1:0] b_res;

  vatu #(.LAYER_ID(3'd1), .PE(PE), .SIMD(SIMD), .IBITS(2), .WDEPTH(WDEPTH), .NGRP(NGRP), .HAS_ACT(1'b1)) u_a (
    .clk, .rst_n, .cfg, .in_valid, .in_waddr, .in_grp, .in_first, .in_last, .in_x,
    .res_valid(a_valid), .res(a_res));
  vatu #(.LAYER_ID(3'd2), .PE(PE), .SIMD(SIMD), .IBITS(1), .WDEPTH(WDEPTH), .NGRP(NGRP), .HAS_ACT(1'b0)) u_b (
    .clk, .rst_n, .cfg, .in_valid, .in_waddr, .in_grp, .in_first, .in_last, .in_x(in_x[SIMD-1:0]),
    .res_valid(b_valid), .res(b_res));

  int wa [WDEPTH][PE][SIMD];   // weights of instance a
  int wb [WDEPTH][PE][SIMD];   // weights of instance b (ternary)
  int th [NGRP][PE][NTH];
  int checks = 0, failures = 0, cyc = 0;
  typedef struct { int due; logic [PE*ABITS-1:0] a; logic [PE*ACC_W-1:0] b; } exp_t;
  exp_t q [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (a_valid != b_valid) begin failures++; $display("valid mismatch"); end
    if (a_valid) begin
      checks++;
      if (q.size() == 0) begin failures++; $display("unexpected result"); end
      else begin
        if (q[0].due != cyc || q[0].a !== a_res || q[0].b !== b_res) begin
          failures++;
          if (failures < 10) $display("cycle %0d (due %0d): a %h/%h b %h/%h", cyc, q[0].due, a_res, q[0].a, b_res, q[0].b);
        end
        void'(q.pop_front());
      end
    end
  end

  task automatic wr(input logic [2:0] layer, input logic is_th, input int addr, input logic [63:0] data);
    @(negedge clk);
    cfg.we = 1; cfg.layer = layer; cfg.is_th = is_th; cfg.addr = CFG_AW'(addr); cfg.data = data;
    @(negedge clk);
    cfg.we = 0;
  endtask

  initial begin
    logic [63:0] d;
    rst_n = 0; cfg = '0; in_valid = 0; in_first = 0; in_last = 0; in_waddr = '0; in_grp = '0; in_x = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < WDEPTH; a++) begin
      logic [63:0] da, db;
      da = '0; db = '0;
      for (int p = 0; p < PE; p++)
        for (int l = 0; l < SIMD; l++) begin
          wa[a][p][l] = $urandom_range(0, 3) - 2;
          wb[a][p][l] = $urandom_range(0, 2) - 1;
          da[(p*SIMD+l)*WBITS +: WBITS] = WBITS'(wa[a][p][l]);
          db[(p*SIMD+l)*WBITS +: WBITS] = WBITS'(wb[a][p][l]);
        end
      wr(3'd1, 0, a, da);
      wr(3'd2, 0, a, db);
    end
    for (int g = 0; g < NGRP; g++)
      for (int p = 0; p < PE; p++) begin
        th[g][p][0] = $urandom_range(0, 8) - 6;
        th[g][p][1] = th[g][p][0] + $urandom_range(0, 6);
        th[g][p][2] = th[g][p][1] + $urandom_range(0, 6);
        d = '0;
        for (int k = 0; k < NTH; k++) d[k*TBITS +: TBITS] = TBITS'(th[g][p][k]);
        wr(3'd1, 1, g*PE+p, d);
      end
    // accumulation runs
    for (int run = 0; run < 150; run++) begin
      int len, g, sa [PE], sb [PE];
      exp_t e;
      len = $urandom_range(1, 6);
      g   = $urandom_range(0, NGRP-1);
      for (int p = 0; p < PE; p++) begin sa[p] = 0; sb[p] = 0; end
      for (int s = 0; s < len; s++) begin
        int a;
        logic [SIMD*ABITS-1:0] xv;
        a  = $urandom_range(0, WDEPTH-1);
        xv = (SIMD*ABITS)'($urandom);
        @(negedge clk);
        in_valid = 1; in_waddr = 3'(a); in_grp = 1'(g);
        in_first = (s == 0); in_last = (s == len-1);
        for (int p = 0; p < PE; p++)
          for (int l = 0; l < SIMD; l++) begin
            sa[p] += int'(xv[l*ABITS +: ABITS]) * wa[a][p][l];
            if (xv[l]) sb[p] += wb[a][p][l];
          end
        if (s == len-1) begin
          e.due = cyc + 3;
          for (int p = 0; p < PE; p++) begin
            int n;
            n = 0;
            for (int k = 0; k < NTH; k++) if (sa[p] >= th[g][p][k]) n++;
            e.a[p*ABITS +: ABITS] = ABITS'(n);
            e.b[p*ACC_W +: ACC_W] = ACC_W'(sb[p]);
          end
          q.push_back(e);
        end
        // operand follows its step by one cycle
        fork
          automatic logic [SIMD*ABITS-1:0] xc = xv;
          begin
            @(negedge clk);
            in_x = xc;
          end
        join_none
        @(posedge clk);
        #1 in_valid = 0;
        if ($urandom_range(0, 3) == 0) begin
          @(negedge clk);
          repeat ($urandom_range(0, 2)) @(negedge clk);
        end
      end
    end
    repeat (10) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d results missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
