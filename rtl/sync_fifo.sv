// sync_fifo - synchronous first-in first-out queue with valid/ready ports.
//
// Every stream connection of the PE goes through one of these: the tuple
// FIFOs in front of and behind each filter stage and the data transform, and
// the word buffer of the store unit. Items are held in an array addressed by
// a read and a write pointer; the head item is presented combinationally on
// out_data whenever out_valid is high.
//
// Interface: an item is written when in_valid && in_ready, read when
// out_valid && out_ready. Both may happen in the same cycle, also when the
// queue is full (the read frees the slot). clr empties the queue
// synchronously. count is the number of stored items.
// Timing: an item written in cycle t is visible at the output in cycle t+1.
// The queue and its valid/ready protocol are this design's choice; the
// document only says that the units are connected by FIFOs.
module sync_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clr,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  T                         in_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output T                         out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  T              mem [DEPTH];
  logic [PW-1:0] rd_ptr, wr_ptr;
  logic          push, pop;

  assign in_ready  = (count < CW'(DEPTH)) || out_ready;
  assign out_valid = (count != '0);
  assign out_data  = mem[rd_ptr];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (p == PW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= inc(wr_ptr);
      if (pop)  rd_ptr <= inc(rd_ptr);
      case ({push, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  // A full queue accepts a write only together with a read.
  property p_no_overflow;
    @(posedge clk) disable iff (!rst_n || clr) push && !pop |-> count < CW'(DEPTH);
  endproperty
  assert property (p_no_overflow);

endmodule
