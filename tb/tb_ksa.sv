// tb_ksa: self-checking testbench for ksa at its default 32 bits.
//
// Drives a stream of operand pairs and carry-ins, one per clock, and compares
// {cout, sum} with a + b + cin computed by the simulator's own arithmetic.
// Operand pairs come from several generators: uniform random, all-propagate (b = ~a),
// all-propagate but one position, sparse operands and all-ones operands, so that long
// carry chains, skip and select paths are all taken.
// A watchdog ends the run with a failure if it does not finish in time.

module tb_ksa;
  localparam int W      = 32;
  localparam int NRAND  = 20000;
  localparam int LIMIT  = NRAND + 2000;

  logic         clk = 1'b0;
  logic [W-1:0] a, b, sum;
  logic         cin, cout;

  int checks   = 0;
  int failures = 0;
  int cycles   = 0;

  ksa #(.WIDTH(W)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

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

  function automatic logic [W-1:0] rnd_w();
    logic [((W + 31) / 32) * 32 - 1:0] r;
    for (int i = 0; i < (W + 31) / 32; i++) r[i*32 +: 32] = $urandom;
    return W'(r);
  endfunction

  task automatic apply(input logic [W-1:0] ta, input logic [W-1:0] tb, input logic tcin);
    logic [W:0] ref_sum;
    @(negedge clk);
    a   = ta;
    b   = tb;
    cin = tcin;
    @(posedge clk);
    ref_sum = {1'b0, ta} + {1'b0, tb} + (W+1)'(tcin);
    checks++;
    if ({cout, sum} !== ref_sum) begin
      failures++;
      if (failures < 10)
        $display("MISMATCH a=%h b=%h cin=%0d got cout=%0d sum=%h want %h", ta, tb, tcin,
                 cout, sum, ref_sum);
    end

  endtask

  initial begin
    logic [W-1:0] ra, rb;
    a = '0; b = '0; cin = 1'b0;
    // directed corner cases
    apply('0, '0, 1'b0);
    apply('0, '0, 1'b1);
    apply('1, '0, 1'b1);
    apply('1, '1, 1'b1);
    apply('1, '1, 1'b0);
    apply('1, W'(1), 1'b0);
    for (int i = 0; i < W; i++) begin
      apply(W'(1) << i, W'(1) << i, 1'b0);
      apply(~(W'(1) << i), W'(1), 1'b1);
    end

    for (int n = 0; n < NRAND; n++) begin
      ra = rnd_w();
      case ($urandom_range(4, 0))
        0: rb = rnd_w();
        1: rb = ~ra;
        2: rb = ~ra ^ (W'(1) << $urandom_range(W - 1, 0));
        3: rb = rnd_w() & rnd_w() & rnd_w();
        default: begin ra = '1; rb = rnd_w() & rnd_w(); end
      endcase
      apply(ra, rb, 1'($urandom));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
