// sync_fifo: single-clock first-word-fall-through FIFO.
//
// Used for the per-chain input buffers of the data formatter and for the transmit buffer that
// holds formatted words until the FX3 write thread has room. The oldest entry is always visible on
// rd_data while empty is low; a pop (rd_en) removes it at the next rising edge. A push while full
// is dropped (the caller counts it); a pop while empty is ignored and flagged by an assertion.
// Push and pop may happen in the same cycle, also when full (the popped slot is reused). count gives the fill level. DEPTH must be a
// power of two. Reset is synchronous, active low. The buffering itself follows the described
// design; depth, width and handshake are this design's choice.
module sync_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     full,
  output logic                     empty,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_wr, do_rd;

  assign empty   = (count == '0);
  assign full    = (count == (AW+1)'(DEPTH));
  assign do_rd   = rd_en && !empty;
  assign do_wr   = wr_en && (!full || do_rd);
  assign rd_data = mem[rptr];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  // Users never pop an empty FIFO; a push into a full one is a legal, counted drop.
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty));
endmodule
