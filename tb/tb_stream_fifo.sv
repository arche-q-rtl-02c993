// tb_stream_fifo: self-checking test of the elastic FIFO. Random producer
// and consumer activity; every word read is compared with a reference queue,
// the full and empty conditions must both occur, and the word count is
// checked at the end.
module tb_stream_fifo;
  localparam int WIDTH = 8, DEPTH = 2;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, in_valid, in_ready, out_valid, out_ready;
  logic [WIDTH-1:0] in_data, out_data;
  logic [WIDTH-1:0] q [$];
  int checks = 0, failures = 0, n_full = 0, n_out = 0, n_in = 0;

  stream_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // handshakes are sampled at the clock edge, before the FIFO updates
  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid && out_ready) begin
        checks++;
        n_out++;
        if (q.size() == 0 || out_data !== q[0]) begin
          failures++; $display("bad word %h", out_data);
        end
        if (q.size() != 0) void'(q.pop_front());
      end
      if (in_valid && in_ready) begin q.push_back(in_data); n_in++; end
    end
  end

  initial begin
    rst_n = 0; in_valid = 0; out_ready = 0; in_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      if (!in_ready) n_full++;
      // the FIFO must never look empty while holding words, nor full with room
      checks++;
      if (out_valid != (q.size() != 0) || in_ready != (q.size() < DEPTH)) begin
        failures++; $display("cycle %0d: flags wrong (size %0d)", cyc, q.size());
      end
      if (!in_valid || in_ready) begin
        in_valid = ($urandom_range(0, 2) != 0);
        in_data  = WIDTH'($urandom);
      end
      out_ready = ($urandom_range(0, 2) == 0) ^ (cyc > 1500);
    end
    checks++;
    if (n_full == 0 || n_out < 500) begin failures++; $display("coverage: full %0d out %0d", n_full, n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
