// stream_delay: fixed-length delay line for a stream word and its valid flag.
//
// Holds the frame stream back by exactly as many pipeline advances as the ICRC
// calculator takes (16 by default), so that the computed ICRC can be written
// over the placeholder while the stream keeps flowing. It advances only when
// en is high, with the same enable as the ICRC pipeline, which keeps the two
// aligned through stalls. The 16-cycle delay is taken from the published
// architecture; the shared stall enable is this implementation's choice.
//
// Interface: on each clock with en high, d/d_valid enter and the oldest entry
// appears on q/q_valid. Output is registered; valid flags are reset.
module stream_delay #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned W     = 512
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic         d_valid,
  input  logic [W-1:0] d,
  output logic         q_valid,
  output logic [W-1:0] q
);
  logic [W-1:0]     data  [DEPTH];
  logic [DEPTH-1:0] valid;

  always_ff @(posedge clk) begin
    if (rst)     valid <= '0;
    else if (en) valid <= {valid[DEPTH-2:0], d_valid};
  end

  always_ff @(posedge clk) begin
    if (en) begin
      data[0] <= d;
      for (int i = 1; i < DEPTH; i++) data[i] <= data[i-1];
    end
  end

  assign q_valid = valid[DEPTH-1];
  assign q       = data[DEPTH-1];

endmodule
