// tb_cla16: self-checking testbench for the 16-bit carry lookahead block cla16.
//
// cla16 has no carry out; it reports its group generate and group propagate instead. For
// every operand pair the testbench checks sum = (a + b + cin) mod 2^16, g_grp = carry out of
// a + b with a carry in of 0, and p_grp = &(a ^ b), all computed with the simulator's own
// arithmetic. Operands are random, all-propagate (b = ~a), all-propagate but one position
// and all-ones. A watchdog ends the run with a failure if it does not finish in time.
module tb_cla16;
  localparam int NRAND = 20000;
  localparam int LIMIT = NRAND + 2000;

  logic        clk = 1'b0;
  logic [15:0] a, b, sum;
  logic        cin, g_grp, p_grp;

  int checks   = 0;
  int failures = 0;
  int cycles   = 0;

  cla16 dut (.a(a), .b(b), .cin(cin), .sum(sum), .g_grp(g_grp), .p_grp(p_grp));

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

  task automatic apply(input logic [15:0] ta, input logic [15:0] tb, input logic tcin);
    logic [16:0] ref_sum, ref_gen;
    @(negedge clk);
    a   = ta;
    b   = tb;
    cin = tcin;
    @(posedge clk);
    ref_sum = {1'b0, ta} + {1'b0, tb} + 17'(tcin);
    ref_gen = {1'b0, ta} + {1'b0, tb};
    checks += 3;
    if (sum !== ref_sum[15:0]) begin
      failures++;
      if (failures < 10) $display("SUM MISMATCH a=%h b=%h cin=%0d got %h", ta, tb, tcin, sum);
    end
    if (g_grp !== ref_gen[16]) begin
      failures++;
      if (failures < 10) $display("G MISMATCH a=%h b=%h got %0d", ta, tb, g_grp);
    end
    if (p_grp !== &(ta ^ tb)) begin
      failures++;
      if (failures < 10) $display("P MISMATCH a=%h b=%h got %0d", ta, tb, p_grp);
    end
  endtask

  initial begin
    logic [15:0] ra, rb;
    a = '0; b = '0; cin = 1'b0;
    apply('0, '0, 1'b0);
    apply('1, '0, 1'b1);
    apply('1, '1, 1'b1);
    for (int i = 0; i < 16; i++) begin
      apply(16'(1) << i, 16'(1) << i, 1'b0);
      apply(~(16'(1) << i), 16'(1), 1'b1);
    end
    for (int n = 0; n < NRAND; n++) begin
      ra = 16'($urandom);
      case ($urandom_range(3, 0))
        0: rb = 16'($urandom);
        1: rb = ~ra;
        2: rb = ~ra ^ (16'(1) << $urandom_range(15, 0));
        default: begin ra = '1; rb = 16'($urandom) & 16'($urandom); end
      endcase
      apply(ra, rb, 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
