// beam_select: turns the final layer's beam scores into the predicted beam.
//
// The final FC layer delivers N signed scores, PAR per beat (beam b*PAR+l in
// lane l of beat b). This unit keeps the largest score seen so far and its
// index; after the last beat it presents that index (the predicted beam
// b-hat) and its score on out_* until out_ready. Ties go to the lower index.
// Input beats are accepted one per cycle while no result is waiting. The
// selection rule is this design's choice: the network's output is the
// index of its largest score.
module beam_select
  import archeq_pkg::*;
#(
  parameter int unsigned N   = 64,
  parameter int unsigned PAR = 16,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [PAR*ACC_W-1:0] in_data,
  output logic               out_valid,
  input  logic               out_ready,
  output logic [IW-1:0]      out_idx,
  output acc_t               out_score
);

  localparam int unsigned NB  = N/PAR;
  localparam int unsigned BW  = (NB > 1) ? $clog2(NB) : 1;

  logic [BW-1:0] beat;
  acc_t          lane_max;
  logic [IW-1:0] lane_idx;

  // best lane of the current beat (lowest lane on ties)
  always_comb begin
    lane_max = acc_t'(in_data[0 +: ACC_W]);
    lane_idx = IW'(32'(beat) * PAR);
    for (int l = 1; l < PAR; l++) begin
      if (acc_t'(in_data[l*ACC_W +: ACC_W]) > lane_max) begin
        lane_max = acc_t'(in_data[l*ACC_W +: ACC_W]);
        lane_idx = IW'(32'(beat) * PAR + l);
      end
    end
  end

  assign in_ready = !out_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      beat      <= '0;
      out_valid <= 1'b0;
    end else begin
      if (in_valid && in_ready) begin
        if (beat == '0 || lane_max > out_score) begin
          out_score <= lane_max;
          out_idx   <= lane_idx;
        end
        if (32'(beat) == NB-1) begin
          beat      <= '0;
          out_valid <= 1'b1;
        end else beat <= beat + 1'b1;
      end
      if (out_valid && out_ready) out_valid <= 1'b0;
    end
  end

  // an offered result stays unchanged until it is taken
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               out_valid && !out_ready |=> out_valid && $stable(out_idx) && $stable(out_score));

endmodule
