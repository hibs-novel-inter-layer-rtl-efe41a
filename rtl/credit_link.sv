// credit_link: one unidirectional bus link between two neighbouring transfer stages, with
// credit-based flow control.
//
// The sending stage may put a flit on the link only while it holds a credit; each credit
// stands for one free word in a small receive buffer at the far end. The sender starts with
// CREDITS credits, spends one per flit, and gets one back for every flit the receiving stage
// takes out of the buffer. So the only wires that cross between the layers are the forward
// valid and flit and one backward credit pulse: no ready signal has to travel to the
// other layer and back within a cycle, and the buffer can never overflow.
//
// How: the sender keeps a counter. The receive buffer is a CREDITS-deep FIFO that a flit
// passes straight through when the buffer is empty and the receiving stage accepts it, so an
// idle link adds no cycle. The credit pulse is registered at the receiver and reaches the
// sender's counter one cycle after the flit left the buffer; the credit round trip is two
// cycles, so CREDITS = 2 keeps one flit per cycle on the link, and CREDITS = 1 halves it.
//
// Interface: tx_* is the sending stage's output (valid/ready inside the sending stage: ready
// is high while a credit is left), rx_* the receiving stage's input (valid/ready, first-word
// fall-through). Both ends run on the bus clock; reset is synchronous, active low, and
// restores all credits.
//
// Following the document: credit-based flow control on the segment between transfer stages.
// This design's choices: the credit count (not given), the pass-through buffer, and the
// one-cycle registered credit return.
module credit_link
  import hibs_pkg::*;
#(
  parameter int unsigned CREDITS = 2
) (
  input  logic  clk,
  input  logic  rst_n,

  input  logic  tx_valid,
  output logic  tx_ready,
  input  flit_t tx_flit,

  output logic  rx_valid,
  input  logic  rx_ready,
  output flit_t rx_flit
);

  localparam int unsigned CW = $clog2(CREDITS + 1);
  localparam int unsigned PW = (CREDITS > 1) ? $clog2(CREDITS) : 1;

  initial assert (CREDITS >= 1) else $error("credit_link: CREDITS must be at least 1");

  // ---------------- sender ----------------
  logic [CW-1:0] credits_q;
  logic          send;
  logic          credit_ret_q;    // backward credit wire

  assign tx_ready = credits_q != '0;
  assign send     = tx_valid && tx_ready;

  // forward link wires
  logic  link_valid;
  flit_t link_flit;
  assign link_valid = send;
  assign link_flit  = tx_flit;

  // ---------------- receiver ----------------
  flit_t         buf_q [CREDITS];
  logic [PW-1:0] rd_ptr, wr_ptr;
  logic [CW-1:0] count;
  logic          empty, take, push, pop;

  assign empty    = count == '0;
  assign rx_valid = empty ? link_valid : 1'b1;
  assign rx_flit  = empty ? link_flit : buf_q[rd_ptr];
  assign take     = rx_valid && rx_ready;
  assign push     = link_valid && !(empty && rx_ready);
  assign pop      = take && !empty;

  function automatic logic [PW-1:0] next_ptr(logic [PW-1:0] p);
    return (32'(p) == CREDITS - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      credits_q    <= CW'(CREDITS);
      credit_ret_q <= 1'b0;
      rd_ptr       <= '0;
      wr_ptr       <= '0;
      count        <= '0;
    end else begin
      credits_q    <= credits_q - CW'(send) + CW'(credit_ret_q);
      credit_ret_q <= take;
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      count <= count + CW'(push) - CW'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) buf_q[wr_ptr] <= link_flit;
  end

  // the sender never sends without room at the far end
  // credits held + words buffered + credit on its way back = buffer size, at every edge
  assert property (@(posedge clk) disable iff (!rst_n)
                   32'(credits_q) + 32'(count) + 32'(credit_ret_q) == CREDITS)
    else $error("credit_link: credits lost or created");
  assert property (@(posedge clk) disable iff (!rst_n) push |-> 32'(count) < CREDITS)
    else $error("credit_link: receive buffer overflow");

endmodule
