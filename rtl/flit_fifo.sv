// flit_fifo: synchronous first-in first-out buffer used as the input buffer
// of every router port.
//
// A circular array of DEPTH words with read and write pointers and an
// occupancy counter. Write side: push with in_valid, accepted when in_ready
// (not full). Read side: the head word is shown on out_data while out_valid
// (not empty) and leaves on pop. A push and a pop in the same cycle are both
// accepted; a full buffer refuses a push even when it is popped in the same
// cycle, so that in_ready is a register-only signal. A pushed
// word can be read the cycle after it is written (one cycle latency).
// Neither in_ready nor out_valid depends combinationally on the other side,
// so no combinational path crosses the buffer. Reset empties it. The buffer depth is this implementation's choice.
module flit_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             pop,
  output logic [WIDTH-1:0] out_data
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    rd_ptr, wr_ptr;
  logic [PW:0]      count;
  logic             do_push, do_pop;

  assign out_valid = (count != '0);
  assign in_ready  = (count != (PW+1)'(DEPTH));
  assign do_pop    = pop && out_valid;
  assign do_push   = in_valid && in_ready;
  assign out_data  = mem[rd_ptr];

  function automatic logic [PW-1:0] next_ptr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  a_no_pop_empty: assert property (@(posedge clk) disable iff (!rst_n) pop |-> out_valid)
    else $error("flit_fifo: pop while empty");
endmodule
