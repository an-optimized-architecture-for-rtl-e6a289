// edmb_adder_tb: self-checking test of the multiplier's adder block. Random partial
// products in the range a select unit can produce (alphabet * sample) are combined; the
// result must equal (p0 + 16 p1 + 256 p2 + 4096 p3), negated when the sign bit is set,
// modulo 2**32. Watchdog included.
module edmb_adder_tb;
  import drs_pkg::*;

  logic                    clk = 1'b0;
  logic signed [SEL_W-1:0] part [NUM_NIB];
  logic                    sign;
  prod_t                   prod;
  int                      checks = 0, failures = 0;

  always #5 clk = ~clk;

  edmb_adder dut (.part(part), .sign(sign), .prod(prod));

  task automatic check(input int p0, input int p1, input int p2, input int p3, input logic s);
    longint m;
    prod_t  expv;
    part[0] = SEL_W'(p0); part[1] = SEL_W'(p1); part[2] = SEL_W'(p2); part[3] = SEL_W'(p3);
    sign = s;
    @(posedge clk);
    m = longint'(p0) + 16 * longint'(p1) + 256 * longint'(p2) + 4096 * longint'(p3);
    if (s) m = -m;
    expv = prod_t'(m);
    checks++;
    if (prod !== expv) begin
      failures++;
      $display("FAIL %0d %0d %0d %0d s=%0d got %0d exp %0d", p0, p1, p2, p3, s, prod, expv);
    end
  endtask

  function automatic int rnd_part();
    return int'(($urandom % 16)) * int'(sample_t'($urandom));
  endfunction

  initial begin
    check(0, 0, 0, 0, 1'b0);
    check(0, 0, 0, 0, 1'b1);
    check(1, 0, 0, 0, 1'b1);
    check(15 * 32767, 15 * 32767, 15 * 32767, 15 * 32767, 1'b0);
    check(-15 * 32768, -15 * 32768, -15 * 32768, -15 * 32768, 1'b1);
    for (int i = 0; i < 3000; i++) check(rnd_part(), rnd_part(), rnd_part(), rnd_part(), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
