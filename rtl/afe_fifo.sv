// afe_fifo: clock-domain bridge from the AFE interface (120 MHz) to the
// signal processing domain (160 MHz).
//
// Carries the merged 512-bit sample words together with their group-start flag
// (WIDTH = 513). The ADCs run continuously and cannot be stalled, so the write
// side has no ready signal: a word offered while the FIFO is full is dropped and
// counted in overflow_cnt (write clock domain). The read side is an AXI-Stream
// source (rd_valid/rd_ready). The FIFO's place and purpose follow the published
// design; depth, drop-on-full and the overflow counter are this
// implementation's choices. Built on async_fifo (Gray-coded pointers).
module afe_fifo #(
  parameter int unsigned WIDTH = 513,
  parameter int unsigned DEPTH = 512
) (
  input  logic             wr_clk,
  input  logic             wr_rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic [31:0]      overflow_cnt,
  input  logic             rd_clk,
  input  logic             rd_rst,
  output logic [WIDTH-1:0] rd_data,
  output logic             rd_valid,
  input  logic             rd_ready
);
  logic full, empty;

  async_fifo #(.W(WIDTH), .DEPTH(DEPTH)) u_fifo (
    .wr_clk, .wr_rst, .wr_en, .wr_data, .wr_full(full),
    .rd_clk, .rd_rst, .rd_en(rd_ready), .rd_data, .rd_empty(empty)
  );

  assign rd_valid = !empty;

  always_ff @(posedge wr_clk) begin
    if (wr_rst)              overflow_cnt <= '0;
    else if (wr_en && full)  overflow_cnt <= overflow_cnt + 1'b1;
  end

endmodule
