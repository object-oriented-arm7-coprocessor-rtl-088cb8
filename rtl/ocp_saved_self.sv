// ocp_saved_self: the CRSavedSelf register with its Inc/Dec logic.
//
// The lower SELF_W bits keep the Self of the caller's instance, the upper
// COUNT_W bits count the calls made inside the same instance that are still
// open. A call between instances saves {0, Self}; a call inside the same
// instance increments the count; a return with a non-zero count decrements
// it. The whole word can be loaded (service instruction, or pop from the
// overflow stack), and after an overflow push the register is set to
// {1, SELF_MARKER} so that the matching return knows to pop. Flags tell the
// sequencer whether the count is zero, full, or one over a push marker.
// One update per clock, selected by op; reset clears the register.
//
// Follows the description: 32 bits, a normal register in its lower part and an
// increment/decrement counter in its upper part, overflowing every 256 calls.
// The marker convention for the overflow is this design's choice: the
// description leaves the stack saving out.
module ocp_saved_self
  import ocp_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  ss_op_e            op,
  input  logic [XLEN-1:0]   self_in,    // CRSelf, for SS_SAVE
  input  logic [XLEN-1:0]   word_in,    // whole word, for SS_LOAD
  output logic [XLEN-1:0]   value,
  output logic [COUNT_W-1:0] count,
  output logic [SELF_W-1:0] saved_self,
  output logic              count_zero,
  output logic              count_full,   // next same-instance call overflows
  output logic              pop_pending   // count one over a push marker
);

  logic [COUNT_W-1:0] count_q;
  logic [SELF_W-1:0]  self_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count_q <= '0;
      self_q  <= '0;
    end else begin
      unique case (op)
        SS_SAVE: begin count_q <= '0; self_q <= self_in[SELF_W-1:0]; end
        SS_INC:  count_q <= count_q + 1'b1;
        SS_DEC:  count_q <= count_q - 1'b1;
        SS_LOAD: {count_q, self_q} <= word_in;
        SS_MARK: begin count_q <= COUNT_W'(1); self_q <= SELF_MARKER; end
        default: ;
      endcase
    end
  end

  assign value       = {count_q, self_q};
  assign count       = count_q;
  assign saved_self  = self_q;
  assign count_zero  = (count_q == '0);
  assign count_full  = (count_q == '1);
  assign pop_pending = (count_q == COUNT_W'(1)) && (self_q == SELF_MARKER);

endmodule
