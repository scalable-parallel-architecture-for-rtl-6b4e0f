// sync_fifo: single clock first-in first-out buffer built on a two-port
// memory array. Used for the DSP header and data FIFOs and for every output
// buffer polled by the common node switch.
//
// Interface: push/wdata write at the clock edge when not full; pop removes the
// head when not empty. The head word rdata is shown combinationally (first
// word fall-through) so a reader sees the data in the cycle it decides to
// pop. count is the number of stored words. A push and a pop in the same cycle
// are both carried out, also when the FIFO is full. Reset empties the FIFO.
module sync_fifo #(
  parameter int W     = 66,
  parameter int DEPTH = 8192
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  logic [W-1:0]             wdata,
  input  logic                     pop,
  output logic [W-1:0]             rdata,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int CW = $clog2(DEPTH+1);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;

  logic do_push, do_pop;
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= wdata;
  end

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= inc(wr_ptr);
      if (do_pop)  rd_ptr <= inc(rd_ptr);
      count <= count + CW'(do_push) - CW'(do_pop);
    end
  end

  assign rdata = mem[rd_ptr];
  assign empty = (count == 0);
  assign full  = (count == CW'(DEPTH));

  // A write into a full FIFO that is not popped at the same time is lost.
  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop))
    else $error("sync_fifo: push while full");
endmodule
