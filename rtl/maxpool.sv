// maxpool: the im2col-less max-pooling stage of an XVAU.
//
// Convolution output pixels (C channels of 2-bit activations each, channel 0
// in the low bits) are written in raster order into a frame buffer. A
// controller then reads every P x P pooling window (stride P) directly from
// that buffer, one pixel per cycle, and keeps a running per-channel maximum
// with a ">" comparator; no window or line structures are built. A pooled
// row is read as soon as the conv rows it covers have been written, so
// pooling runs alongside the convolution. Rows or columns left over when
// H or W is not a multiple of P are written but not pooled.
//
// Timing: P*P read cycles, then the pooled pixel is presented on out_* until
// out_ready (about P*P+2 cycles per pooled pixel when not stalled). The next
// frame is accepted once the current one is fully written and pooled. The
// direct-read pooling is the design's; P = 2 and the frame hand-over rule
// are this design's choices.
module maxpool
  import archeq_pkg::*;
#(
  parameter int unsigned H = 20,
  parameter int unsigned W = 20,
  parameter int unsigned C = 16,
  parameter int unsigned P = 2,
  localparam int unsigned DW = C*ABITS
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [DW-1:0] in_data,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [DW-1:0] out_data
);

  localparam int unsigned OH   = H/P;
  localparam int unsigned OW   = W/P;
  localparam int unsigned NPIX = H*W;
  localparam int unsigned PAW  = $clog2(NPIX);
  localparam int unsigned CW   = $clog2(NPIX+1);

  typedef enum logic [1:0] {S_ISSUE, S_WAIT, S_FLUSH} state_t;

  logic [DW-1:0] pbuf [NPIX];
  logic [CW-1:0] wr_cnt;
  logic          frame_done;
  state_t        state;

  assign in_ready = (wr_cnt < CW'(NPIX));

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) pbuf[PAW'(wr_cnt)] <= in_data;
  end

  assign frame_done = (state == S_FLUSH) && (wr_cnt == CW'(NPIX));

  always_ff @(posedge clk) begin
    if (!rst_n)                    wr_cnt <= '0;
    else if (frame_done)           wr_cnt <= '0;
    else if (in_valid && in_ready) wr_cnt <= wr_cnt + 1'b1;
  end

  // ---------------- pooled-window read controller ----------------
  int unsigned    py, px, wy, wx;
  logic           rows_ok, issue, wlast;
  logic [PAW-1:0] raddr;

  always_comb begin
    rows_ok = (32'(wr_cnt) >= (py*P + P) * W);
    issue   = (state == S_ISSUE) && rows_ok;
    raddr   = PAW'((py*P + wy) * W + px*P + wx);
    wlast   = (wy == P-1) && (wx == P-1);
  end

  logic [DW-1:0] rd;
  logic          v_q, first_q, last_q;

  always_ff @(posedge clk) begin
    rd <= pbuf[raddr];
    if (!rst_n) begin
      v_q <= 1'b0; first_q <= 1'b0; last_q <= 1'b0;
    end else begin
      v_q     <= issue;
      first_q <= (wy == 0) && (wx == 0);
      last_q  <= wlast;
    end
  end

  // running per-channel maximum; out_data is the max register itself
  always_ff @(posedge clk) begin
    if (v_q) begin
      for (int c = 0; c < C; c++) begin
        if (first_q || (rd[c*ABITS +: ABITS] > out_data[c*ABITS +: ABITS]))
          out_data[c*ABITS +: ABITS] <= rd[c*ABITS +: ABITS];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_ISSUE;
      py <= 0; px <= 0; wy <= 0; wx <= 0;
      out_valid <= 1'b0;
    end else begin
      case (state)
        S_ISSUE: if (issue) begin
          if (wx == P-1) begin
            wx <= 0;
            if (wy == P-1) begin
              wy    <= 0;
              state <= S_WAIT;
            end else wy <= wy + 1;
          end else wx <= wx + 1;
        end
        S_WAIT: if (out_valid && out_ready) begin
          out_valid <= 1'b0;
          if (px == OW-1) begin
            px <= 0;
            if (py == OH-1) begin
              py    <= 0;
              state <= S_FLUSH;
            end else begin
              py    <= py + 1;
              state <= S_ISSUE;
            end
          end else begin
            px    <= px + 1;
            state <= S_ISSUE;
          end
        end
        S_FLUSH: if (frame_done) state <= S_ISSUE;
        default: state <= S_ISSUE;
      endcase
      if (v_q && last_q) out_valid <= 1'b1;
    end
  end

  // an offered result stays unchanged until it is taken
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               out_valid && !out_ready |=> out_valid && $stable(out_data));

endmodule
