// Small synchronous FIFO used as the input buffer of each control-network
// port of the electronic control unit.
//
// A circular buffer of DEPTH entries with a registered occupancy count.
// Interface: valid/ready on both sides. Writing happens when wr_valid and
// wr_ready are high at a clock edge; rd_valid/rd_data show the oldest entry
// and rd_pop removes it. wr_ready depends only on registered state, so chains
// of routers contain no combinational path through the ready signals. A
// pop and a push can happen in the same cycle, but a full FIFO does not
// accept a push in the cycle it is popped. Synchronous active-low reset
// empties the FIFO.
module ctrl_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_valid,
  output logic             wr_ready,
  input  logic [WIDTH-1:0] wr_data,
  output logic             rd_valid,
  output logic [WIDTH-1:0] rd_data,
  input  logic             rd_pop
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rd_ptr, wr_ptr;
  logic [AW:0]      count;
  logic             push, pop;

  assign wr_ready = (count < (AW+1)'(DEPTH));
  assign rd_valid = (count != '0);
  assign rd_data  = mem[rd_ptr];
  assign push     = wr_valid && wr_ready;
  assign pop      = rd_pop && rd_valid;

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= wr_data;
  end

  // A pop of an empty FIFO is a protocol error of the user.
  assert property (@(posedge clk) disable iff (!rst_n) rd_pop |-> rd_valid)
    else $error("ctrl_fifo: pop while empty");

endmodule
