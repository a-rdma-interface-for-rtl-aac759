// async_fifo: dual-clock FIFO with Gray-coded pointers.
//
// Write and read pointers are (log2 DEPTH + 1)-bit binary counters; each is
// passed to the other clock domain in Gray code through a two-flop
// synchroniser, so full and empty are conservative (they may be reported a few
// cycles late, never early). The memory is written on wr_clk and read
// first-word-fall-through: rd_data shows the oldest word whenever rd_empty is
// low, and rd_en removes it. DEPTH must be a power of two.
//
// Interface: wr_en is ignored while wr_full, rd_en while rd_empty. Each side
// has its own synchronous active-high reset; both must be applied together.
module async_fifo #(
  parameter int unsigned W     = 512,
  parameter int unsigned DEPTH = 512
) (
  input  logic         wr_clk,
  input  logic         wr_rst,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  output logic         wr_full,
  input  logic         rd_clk,
  input  logic         rd_rst,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         rd_empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wbin, wgray, rbin, rgray;
  logic [AW:0]  rgray_w1, rgray_w2;   // read pointer seen by the write side
  logic [AW:0]  wgray_r1, wgray_r2;   // write pointer seen by the read side

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write side -------------------------------------------
  logic [AW:0] wbin_n;
  assign wbin_n  = wbin + 1'b1;
  assign wr_full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  always_ff @(posedge wr_clk) begin
    if (wr_en && !wr_full) mem[wbin[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk) begin
    if (wr_rst) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_en && !wr_full) begin
        wbin  <= wbin_n;
        wgray <= bin2gray(wbin_n);
      end
    end
  end

  // ---------------- read side --------------------------------------------
  logic [AW:0] rbin_n;
  assign rbin_n   = rbin + 1'b1;
  assign rd_empty = (rgray == wgray_r2);
  assign rd_data  = mem[rbin[AW-1:0]];

  always_ff @(posedge rd_clk) begin
    if (rd_rst) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd_en && !rd_empty) begin
        rbin  <= rbin_n;
        rgray <= bin2gray(rbin_n);
      end
    end
  end

endmodule
