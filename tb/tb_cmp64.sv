// tb_cmp64: self-checking test of the 64-bit comparator.
// Drives one operand pair per cycle (the worked example key = 0x59A4737582A775AB,
// pivot = 0xDDAEE7764589DB15, equal values, equal high halves, sign-bit corner cases
// and random pairs) and compares gt, one cycle later, with the unsigned 64-bit
// comparison key > pivot computed directly. A watchdog ends a stuck run.
module tb_cmp64;
  logic        clk = 1'b0;
  logic [63:0] key, pivot;
  logic        gt;
  int          checks = 0, failures = 0;

  cmp64 dut (.clk(clk), .key(key), .pivot(pivot), .gt(gt));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [63:0] k, input logic [63:0] p);
    logic exp;
    key   = k;
    pivot = p;
    exp   = k > p;
    @(posedge clk);  // operands sampled
    #1;
    checks++;
    if (gt !== exp) begin
      failures++;
      $display("FAIL key=%h pivot=%h gt=%b exp=%b", k, p, gt, exp);
    end
  endtask

  initial begin
    logic [63:0] a, b;
    key = '0; pivot = '0;
    @(negedge clk);
    apply(64'h59A4737582A775AB, 64'hDDAEE7764589DB15);  // not larger
    apply(64'hDDAEE7764589DB15, 64'h59A4737582A775AB);  // larger
    apply(64'h1234_5678_9ABC_DEF0, 64'h1234_5678_9ABC_DEF0);  // equal
    apply(64'h0000_0001_8000_0000, 64'h0000_0001_7FFF_FFFF);  // hi equal, xor31=1
    apply(64'h0000_0001_7FFF_FFFF, 64'h0000_0001_8000_0000);
    apply(64'h0000_0001_0000_0005, 64'h0000_0001_0000_0004);  // hi equal, xor31=0
    apply(64'h0000_0001_0000_0004, 64'h0000_0001_0000_0005);
    apply(64'h8000_0000_0000_0000, 64'h7FFF_FFFF_FFFF_FFFF);  // hi differs, xor63=1
    apply(64'h7FFF_FFFF_FFFF_FFFF, 64'h8000_0000_0000_0000);
    apply(64'h0000_0002_0000_0000, 64'h0000_0001_FFFF_FFFF);  // hi differs, xor63=0
    apply(64'h0000_0001_FFFF_FFFF, 64'h0000_0002_0000_0000);
    apply(64'hFFFF_FFFF_FFFF_FFFF, 64'h0);
    apply(64'h0, 64'hFFFF_FFFF_FFFF_FFFF);
    for (int n = 0; n < 2000; n++) begin
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      case (n % 4)
        1: b[63:32] = a[63:32];                    // force equal high halves
        2: b = a + 64'(($urandom % 5)) - 64'd2;    // near-equal values
        3: b[63] = a[63];                          // same sign bits
        default: ;
      endcase
      apply(a, b);
    end
    // back-to-back stream: a new pair every cycle, results one cycle behind
    begin
      logic exp_q;
      key = 64'd10; pivot = 64'd3;
      @(posedge clk); #1;
      exp_q = 1'b1;
      for (int n = 0; n < 50; n++) begin
        a = {$urandom, $urandom}; b = {$urandom, $urandom};
        key = a; pivot = b;
        checks++;
        if (gt !== exp_q) begin failures++; $display("FAIL stream %0d", n); end
        @(posedge clk); #1;
        exp_q = a > b;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
