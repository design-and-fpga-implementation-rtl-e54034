// tb_hybrid_adder_top: end-to-end testbench of hybrid_adder_top, all six 64-bit hybrid
// adders at their default sizes.
//
// Every clock each architecture gets its own operand pair and carry in, drawn from mixed
// generators (uniform random, all-propagate b = ~a, all-propagate but one bit, sparse,
// all-ones), and its {cout, sum} is compared with a + b + cin from the simulator's own
// arithmetic. The skip flags of architectures 4 and 5 are checked against the rule "a block
// bypasses exactly when all its bits propagate".
//
// The carry entering every bit position is recovered from the reference as
// (a + b + cin) ^ a ^ b. From it the testbench counts how often each mechanism the design is
// built on was exercised, and counts a failure for any that never was:
//   - the lower-to-upper section carry C32 at 1, for every architecture
//   - the CSLA-to-KSA carry C16 at 1 (architectures 3 and 4)
//   - the second-level lookahead carry C16 at 1 inside the CLA (architecture 1)
//   - a carry select block choosing its carry-in-1 result (architectures 2, 3, 4)
//   - an upper skip block bypassing a carry of 1 (architectures 4 and 5)
//   - a carry rippling through all 64 bits into cout (every architecture)
// A watchdog ends the run with a failure if it does not finish in time.
module tb_hybrid_adder_top;
  localparam int NARCH = 6;
  localparam int NVEC  = 20000;
  localparam int LIMIT = NVEC + 1000;

  logic clk = 1'b0;

  logic [63:0] a   [NARCH];
  logic [63:0] b   [NARCH];
  logic        cin [NARCH];
  logic [63:0] sum [NARCH];
  logic        cout[NARCH];
  logic [1:0]  skip4, skip5;

  int checks   = 0;
  int failures = 0;
  int cycles   = 0;

  // Mechanism counters, per architecture where they apply.
  int c32_one   [NARCH];
  int full_prop [NARCH];
  int c16_one   [NARCH];
  int sel_one   [NARCH];
  int skip_one  [NARCH];

  hybrid_adder_top dut (
    .a1(a[0]), .b1(b[0]), .cin1(cin[0]), .sum1(sum[0]), .cout1(cout[0]),
    .a2(a[1]), .b2(b[1]), .cin2(cin[1]), .sum2(sum[1]), .cout2(cout[1]),
    .a3(a[2]), .b3(b[2]), .cin3(cin[2]), .sum3(sum[2]), .cout3(cout[2]),
    .a4(a[3]), .b4(b[3]), .cin4(cin[3]), .sum4(sum[3]), .cout4(cout[3]),
    .a5(a[4]), .b5(b[4]), .cin5(cin[4]), .sum5(sum[4]), .cout5(cout[4]),
    .a6(a[5]), .b6(b[5]), .cin6(cin[5]), .sum6(sum[5]), .cout6(cout[5]),
    .skip4(skip4), .skip5(skip5)
  );

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (cycles > LIMIT) begin
      failures = failures + 1;
      $display("watchdog: test did not finish in %0d cycles", LIMIT);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  function automatic logic [63:0] rnd64();
    return {$urandom, $urandom};
  endfunction

  task automatic pick(output logic [63:0] ta, output logic [63:0] tb, output logic tc);
    ta = rnd64();
    case ($urandom_range(5, 0))
      0, 1: tb = rnd64();
      2: tb = ~ta;
      3: tb = ~ta ^ (64'(1) << $urandom_range(63, 0));
      4: tb = rnd64() & rnd64() & rnd64();
      default: begin ta = '1; tb = rnd64() & rnd64(); end
    endcase
    tc = 1'($urandom);
  endtask

  task automatic check_arch(input int n, input logic [1:0] skip, input bit has_skip);
    logic [64:0] ref_sum, carries;
    ref_sum = {1'b0, a[n]} + {1'b0, b[n]} + 65'(cin[n]);
    carries = ref_sum ^ {1'b0, a[n]} ^ {1'b0, b[n]};   // carries[k] = carry into bit k
    checks++;
    if ({cout[n], sum[n]} !== ref_sum) begin
      failures++;
      if (failures < 10)
        $display("MISMATCH arch %0d a=%h b=%h cin=%0d got %0d_%h want %h", n + 1, a[n], b[n],
                 cin[n], cout[n], sum[n], ref_sum);
    end
    if (carries[32]) c32_one[n]++;
    if (carries[16]) c16_one[n]++;
    if (&(a[n] ^ b[n]) && cin[n]) full_prop[n]++;
    for (int k = 1; k < 8; k++) if (carries[4*k]) sel_one[n]++;
    if (has_skip) begin
      for (int k = 0; k < 2; k++) begin
        logic want;
        want = &(16'((a[n] ^ b[n]) >> (32 + 16 * k)));
        checks++;
        if (skip[k] !== want) begin
          failures++;
          if (failures < 10) $display("SKIP MISMATCH arch %0d block %0d", n + 1, k);
        end
        if (want && carries[32 + 16 * k]) skip_one[n]++;
      end
    end
  endtask

  task automatic require(input string what, input int arch, input int count);
    $display("arch %0d %-28s %0d", arch, what, count);
    if (count == 0) begin
      failures++;
      $display("  never exercised");
    end
  endtask

  initial begin
    for (int n = 0; n < NARCH; n++) begin
      a[n] = '0; b[n] = '0; cin[n] = 1'b0;
      c32_one[n] = 0; full_prop[n] = 0; c16_one[n] = 0; sel_one[n] = 0; skip_one[n] = 0;
    end
    for (int v = 0; v < NVEC; v++) begin
      @(negedge clk);
      for (int n = 0; n < NARCH; n++) begin
        if (v == 0) begin
          a[n] = '1; b[n] = '0; cin[n] = 1'b1;   // a carry through all 64 bits
        end else begin
          pick(a[n], b[n], cin[n]);
        end
      end
      @(posedge clk);
      check_arch(0, 2'b00, 1'b0);
      check_arch(1, 2'b00, 1'b0);
      check_arch(2, 2'b00, 1'b0);
      check_arch(3, skip4, 1'b1);
      check_arch(4, skip5, 1'b1);
      check_arch(5, 2'b00, 1'b0);
    end
    for (int n = 0; n < NARCH; n++) begin
      require("C32 = 1 into upper section", n + 1, c32_one[n]);
      require("carry through all 64 bits", n + 1, full_prop[n]);
    end
    require("second-level lookahead C16=1", 1, c16_one[0]);
    require("CSLA block selected cin=1", 2, sel_one[1]);
    require("CSLA-to-KSA carry C16 = 1", 3, c16_one[2]);
    require("CSLA block selected cin=1", 3, sel_one[2]);
    require("CSLA-to-KSA carry C16 = 1", 4, c16_one[3]);
    require("CSLA block selected cin=1", 4, sel_one[3]);
    require("skip block bypassed a 1", 4, skip_one[3]);
    require("skip block bypassed a 1", 5, skip_one[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
