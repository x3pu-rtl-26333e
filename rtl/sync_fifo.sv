// sync_fifo: single-clock FIFO with valid/ready handshakes on both sides.
//
// Used as the Data Output FIFO between the Data Transfer Engine and the
// host's DataOut port, and as the buffer in front of the engine on DataIn.
// The description only names the output FIFO; its depth and the handshake
// are this implementation's choices.
//
// Interface: a word is written when wr_valid && wr_ready, read when
// rd_valid && rd_ready. wr_ready is low when full; rd_valid is high when not
// empty and rd_data is the oldest word (registered storage, combinational
// read of the head). A word written into an empty FIFO can be read in the
// next cycle. DEPTH must be a power of two.
module sync_fifo #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_valid,
  output logic         wr_ready,
  input  logic [W-1:0] wr_data,
  output logic         rd_valid,
  input  logic         rd_ready,
  output logic [W-1:0] rd_data,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW:0]   wptr, rptr;
  logic          do_wr, do_rd;

  assign count    = wptr - rptr;
  assign wr_ready = (count != (AW+1)'(DEPTH));
  assign rd_valid = (count != '0);
  assign rd_data  = mem[rptr[AW-1:0]];
  assign do_wr    = wr_valid && wr_ready;
  assign do_rd    = rd_valid && rd_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= wr_data;
  end

  // The pointers never move further apart than the depth.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) count <= (AW+1)'(DEPTH));

endmodule
