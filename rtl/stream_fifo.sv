// stream_fifo: shallow elastic FIFO between two layers.
//
// A DEPTH-entry circular buffer with valid/ready on both sides. It decouples
// the producer's and consumer's stalls so each layer can run at its own pace.
// Data written at cycle t can be read at t+1 (no fall-through). in_ready is
// high while an entry is free; out_valid while one is filled. Both sides may
// transfer in the same cycle. The depth is this design's choice ("shallow").
module stream_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic [AW:0]      cnt;
  logic             push, pop;

  assign in_ready  = (cnt < (AW+1)'(DEPTH));
  assign out_valid = (cnt != '0);
  assign out_data  = mem[rp];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; cnt <= '0;
    end else begin
      if (push) wp <= (32'(wp) == DEPTH-1) ? '0 : wp + 1'b1;
      if (pop)  rp <= (32'(rp) == DEPTH-1) ? '0 : rp + 1'b1;
      cnt <= cnt + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  // a presented entry stays until it is taken
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           out_valid && !out_ready |=> out_valid && $stable(out_data));
  a_bound: assert property (@(posedge clk) disable iff (!rst_n) cnt <= (AW+1)'(DEPTH));

endmodule
