// tb_mbe_sizes: the Booth multiplier at the operand widths 16, 32 and 64
// bits. Each width gets corner operands (zero, +-1, the most negative and
// most positive values) and random operands; products are compared with a
// 128-bit signed multiplication done here. The modelled second-step delay
// of each array's wiring rule (mbe_pkg::array_delay) is checked against (3N-4)/4 XOR delays: 11, 23 and 47. Combinational: each product is
// checked in the time step its operands are applied.
module tb_mbe_sizes;
  logic [15:0]  x16, y16;
  logic [31:0]  p16;
  logic [31:0]  x32, y32;
  logic [63:0]  p32;
  logic [63:0]  x64, y64;
  logic [127:0] p64;
  int           checks = 0, failures = 0;

  mbe_multiplier #(.N(16)) u16 (.x(x16), .y(y16), .p(p16));
  mbe_multiplier #(.N(32)) u32 (.x(x32), .y(y32), .p(p32));
  mbe_multiplier #(.N(64)) u64 (.x(x64), .y(y64), .p(p64));

  function automatic logic [63:0] pick(input int unsigned n, input int k);
    logic [63:0] v;
    case (k)
      0: v = '0;
      1: v = 64'd1;
      2: v = '1;                       // -1
      3: v = 64'(1) << (n - 1);        // most negative
      4: v = (64'(1) << (n - 1)) - 1;  // most positive
      default: v = {$urandom, $urandom};
    endcase
    return v;
  endfunction

  task automatic cmp(input int n, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL N=%0d got %h exp %h", n, got, exp);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    checks++;
    if (mbe_pkg::array_delay(16) != 11) begin failures++; $display("FAIL N=16 delay %0d", mbe_pkg::array_delay(16)); end
    checks++;
    if (mbe_pkg::array_delay(32) != 23) begin failures++; $display("FAIL N=32 delay %0d", mbe_pkg::array_delay(32)); end
    checks++;
    if (mbe_pkg::array_delay(64) != 47) begin failures++; $display("FAIL N=64 delay %0d", mbe_pkg::array_delay(64)); end
    $display("modelled array delay: N=16 %0dT, N=32 %0dT, N=64 %0dT",
             mbe_pkg::array_delay(16), mbe_pkg::array_delay(32), mbe_pkg::array_delay(64));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 25; a++) begin
      for (int b = 0; b < 25; b++) begin
        logic signed [127:0] ex16, ex32, ex64;
        int ka, kb;
        ka = (a < 5) ? a : 5;
        kb = (b < 5) ? b : 5;
        x16 = 16'(pick(16, ka)); y16 = 16'(pick(16, kb));
        x32 = 32'(pick(32, ka)); y32 = 32'(pick(32, kb));
        x64 = pick(64, ka);      y64 = pick(64, kb);
        ex16 = 128'($signed(x16)) * 128'($signed(y16));
        ex32 = 128'($signed(x32)) * 128'($signed(y32));
        ex64 = 128'($signed(x64)) * 128'($signed(y64));
        #1;
        cmp(16, 128'(p16), 128'(ex16[31:0]));
        cmp(32, 128'(p32), 128'(ex32[63:0]));
        cmp(64, p64, ex64);
      end
    end
    checks++;
    if (mbe_pkg::array_delay(16) != 11) begin failures++; $display("FAIL N=16 delay %0d", mbe_pkg::array_delay(16)); end
    checks++;
    if (mbe_pkg::array_delay(32) != 23) begin failures++; $display("FAIL N=32 delay %0d", mbe_pkg::array_delay(32)); end
    checks++;
    if (mbe_pkg::array_delay(64) != 47) begin failures++; $display("FAIL N=64 delay %0d", mbe_pkg::array_delay(64)); end
    $display("modelled array delay: N=16 %0dT, N=32 %0dT, N=64 %0dT",
             mbe_pkg::array_delay(16), mbe_pkg::array_delay(32), mbe_pkg::array_delay(64));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
