// tb_ocp_saved_self: random sequences of save, increment, decrement, load and
// mark operations against a model of the {count, Self} register; checks the
// value and the zero, full and pop-pending flags every cycle, including the
// counter running up to 255.
module tb_ocp_saved_self;
  import ocp_pkg::*;
  logic clk = 0, rst_n = 0;
  ss_op_e op;
  logic [31:0] self_in, word_in, value;
  logic [7:0] count;
  logic [23:0] saved_self;
  logic count_zero, count_full, pop_pending;
  logic [7:0] m_cnt;
  logic [23:0] m_self;
  int checks = 0, failures = 0, saw_full = 0, saw_pop = 0;

  ocp_saved_self dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    op = SS_HOLD; self_in = 0; word_in = 0; m_cnt = 0; m_self = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (value !== {m_cnt, m_self} || count !== m_cnt || saved_self !== m_self ||
          count_zero !== (m_cnt == 0) || count_full !== (m_cnt == 8'hFF) ||
          pop_pending !== (m_cnt == 1 && m_self == 24'hFFFFFF)) begin
        failures++; $display("FAIL step %0d value %h model %h flags %b%b%b", i, value, {m_cnt, m_self}, count_zero, count_full, pop_pending);
      end
      if (count_full) saw_full++;
      if (pop_pending) saw_pop++;
      // long runs of increments so that the counter fills
      if (i < 300)       op = (i == 0) ? SS_SAVE : SS_INC;
      else               op = ss_op_e'($urandom % 6);
      self_in = $urandom; word_in = $urandom;
      @(posedge clk); #1;
      case (op)
        SS_SAVE: begin m_cnt = 0; m_self = self_in[23:0]; end
        SS_INC:  m_cnt++;
        SS_DEC:  m_cnt--;
        SS_LOAD: {m_cnt, m_self} = word_in;
        SS_MARK: begin m_cnt = 1; m_self = '1; end
        default: ;
      endcase
    end
    checks++; if (saw_full == 0 || saw_pop == 0) begin failures++; $display("FAIL full/pop flags never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
