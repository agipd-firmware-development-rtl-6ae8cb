// cell_fifo: the "reusable cell ID" FIFO of the veto handler.
//
// A synchronous first-word-fall-through FIFO: dout shows the oldest entry
// whenever empty is low, and pop removes it. Push and pop may happen in the
// same cycle (also when the FIFO is full, which keeps it full, but not when it
// is empty). clear empties it synchronously, used at the start of every train.
// The depth defaults to 352, the number of ASIC storage cells, so it can hold
// every cell at once; the width holds a cell ID. A push to a full FIFO or a
// pop from an empty one is a usage error caught by assertions and ignored.
module cell_fifo #(
  parameter int unsigned DEPTH = 352,
  parameter int unsigned WIDTH = 9,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full,
  output logic [CW-1:0]    count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_push, do_pop;

  assign empty   = (count == '0);
  assign full    = (count == CW'(DEPTH));
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign dout    = mem[rd_ptr];

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else if (clear) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= incr(wr_ptr);
      if (do_pop)  rd_ptr <= incr(rd_ptr);
      count <= count + CW'(do_push) - CW'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n && !clear) begin
      assert (!(push && full && !pop)) else $error("cell_fifo: push while full");
      assert (!(pop && empty)) else $error("cell_fifo: pop while empty");
    end
  end

endmodule
