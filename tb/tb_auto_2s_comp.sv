// Self-checking testbench of auto_2s_comp, the sign-magnitude <-> two's
// complement converter. It replays the three words of the original design's
// converter waveform (1 -> 1, 1000000000001010 -> 1111111111110110,
// 3 -> 3), then random words. The expected word is computed from the
// integer value of the sign-magnitude input (minus the magnitude, modulo
// 2**16). It also checks the two-strobe timing: the output does not move on
// Load alone, only on CO; and that converting twice gives back the word.
module tb_auto_2s_comp;
  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        load = 1'b0, co = 1'b0;
  logic [15:0] eee = '0;
  logic [15:0] oo, oo2;
  int checks = 0, failures = 0;

  auto_2s_comp dut (.clk, .rst_n, .load, .co, .eee, .oo);
  // Second converter fed by the first: the round trip.
  auto_2s_comp dut2 (.clk, .rst_n, .load, .co, .eee(oo), .oo(oo2));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] expect_of(input logic [15:0] x);
    int mag;
    mag = int'(x[14:0]);
    if (x[15]) return 16'(-mag);
    return x;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // One conversion: Load on one clock, CO on the next.
  task automatic convert(input logic [15:0] x);
    logic [15:0] prev_oo;
    prev_oo = oo;
    @(negedge clk); eee = x; load = 1'b1;
    @(negedge clk); load = 1'b0; eee = ~x;   // input may change after Load
    check(oo == prev_oo, $sformatf("output moved on Load alone for %h", x));
    co = 1'b1;
    @(negedge clk); co = 1'b0;
    check(oo == expect_of(x), $sformatf("in %b out %b want %b", x, oo, expect_of(x)));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(oo == 16'h0000, "reset value");
    convert(16'b0000000000000001);
    check(oo == 16'b0000000000000001, "waveform word 1");
    convert(16'b1000000000001010);
    check(oo == 16'b1111111111110110, "waveform word 2");
    convert(16'b0000000000000011);
    check(oo == 16'b0000000000000011, "waveform word 3");
    convert(16'h8000);                       // negative zero
    for (int i = 0; i < 500; i++) begin
      logic [15:0] x;
      x = 16'($urandom);
      convert(x);
    end
    // Round trip: x -> oo -> oo2 must give back x (except negative zero).
    for (int i = 0; i < 200; i++) begin
      logic [15:0] x;
      x = 16'($urandom);
      if (x == 16'h8000) x = 16'h8001;
      convert(x);
      convert(x);   // dut2 captures oo (conversion of x) and converts it
      check(oo2 == x, $sformatf("round trip %h gave %h", x, oo2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
