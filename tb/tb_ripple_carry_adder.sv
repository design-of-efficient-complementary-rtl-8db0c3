// tb_ripple_carry_adder: 16-bit ripple-carry adder against the + operator,
// on corner cases (full carry ripple) and random operands.
module tb_ripple_carry_adder;
  localparam int unsigned W = 16;

  logic [W-1:0] a, b, s;
  logic         ci, co;
  int           checks = 0, failures = 0;

  ripple_carry_adder #(.WIDTH(W)) dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  task automatic apply(input logic [W-1:0] ta, input logic [W-1:0] tb_, input logic tci);
    logic [W:0] exp;
    a  = ta;
    b  = tb_;
    ci = tci;
    exp = {1'b0, ta} + {1'b0, tb_} + (W+1)'(tci);
    #1;
    checks++;
    if ({co, s} !== exp) begin
      failures++;
      $display("FAIL %h + %h + %b = %h, got %b %h", ta, tb_, tci, exp, co, s);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('1, '0, 1'b1);
    apply('1, 16'h0001, 1'b0);
    apply('1, '1, 1'b1);
    apply('0, '0, 1'b0);
    apply(16'h5555, 16'hAAAA, 1'b1);
    for (int k = 0; k < 2000; k++) apply(W'($urandom), W'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
