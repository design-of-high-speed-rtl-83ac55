// tb_finite_field_mul_ppa: end-to-end testbench of the multiplier at its
// default size (32 x 32 -> 64 bits, no parameter override).
//
// A new operand pair is applied every clock cycle, after a falling edge. After
// each rising edge the product register must hold the signed product of the
// pair applied just before that edge (one cycle latency, one result per
// cycle); the reference is 64-bit signed multiplication done here. The first
// vector is 3 x 3 = 9. Corner operands (most negative, -1, all-ones patterns)
// and random operands follow.
//
// Mechanisms counted from the multiplier operand itself: each of the five
// Booth digit values 0, +1, -1, +2, -2 in some row, a negative and a positive
// product, and back-to-back issue of new pairs. Any that never occurs counts
// as a failure.
module tb_finite_field_mul_ppa;

  int checks   = 0;
  int failures = 0;

  localparam int unsigned N = 32;

  logic             clk;
  logic [N-1:0]     a = '0, b = '0;
  logic [2*N-1:0]   c;

  finite_field_mul_ppa dut (.clk(clk), .a(a), .b(b), .c(c));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  int digit_seen [5] = '{default: 0};  // 0, +1, -1, +2, -2
  int neg_products = 0, pos_products = 0, back_to_back = 0;
  int cycles;

  initial cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;

  // Count the Booth digits the multiplier operand contains.
  task automatic count_digits(logic [N-1:0] m);
    logic [N:0] e;
    int d;
    e = {m, 1'b0};
    for (int i = 0; i < N/2; i++) begin
      d = -2 * int'(e[2*i+2]) + int'(e[2*i+1]) + int'(e[2*i]);
      case (d)
        0:  digit_seen[0]++;
        1:  digit_seen[1]++;
        -1: digit_seen[2]++;
        2:  digit_seen[3]++;
        -2: digit_seen[4]++;
        default: ;
      endcase
    end
  endtask

  // Apply one pair, wait one rising edge, compare.
  task automatic run(logic [N-1:0] x, logic [N-1:0] y);
    longint expd;
    int     start;
    @(negedge clk);
    a = x;
    b = y;
    count_digits(y);
    expd  = longint'($signed(x)) * longint'($signed(y));
    start = cycles;
    @(posedge clk);
    #1;
    checks++;
    if (c !== 64'(expd) || cycles - start != 1) begin
      failures++;
      $display("FAIL %0d * %0d = %0d expected %0d (latency %0d)",
               $signed(x), $signed(y), $signed(c), expd, cycles - start);
    end
    if (expd < 0) neg_products++;
    if (expd > 0) pos_products++;
    back_to_back++;
  endtask

  initial begin
    logic [N-1:0] corners [8];
    corners = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF,
                32'h5555_5555, 32'hAAAA_AAAA, 32'h0000_0003};

    run(32'd3, 32'd3);
    checks++;
    if (c != 64'd9) begin
      failures++;
      $display("FAIL 3 x 3 gave %0d", c);
    end

    foreach (corners[i]) foreach (corners[j]) run(corners[i], corners[j]);
    repeat (3000) run($urandom(), $urandom());
    // Small operands, as in a typical integer workload.
    repeat (500) run(32'($urandom_range(0, 255)) - 32'd128, 32'($urandom_range(0, 255)) - 32'd128);

    // Output register holds its value when inputs change mid-cycle.
    @(negedge clk);
    a = 32'd7;
    b = 32'd6;
    #2;
    checks++;
    if (c == 64'd42) begin
      failures++;
      $display("FAIL product appeared before the clock edge");
    end
    @(posedge clk);
    #1;
    checks++;
    if (c != 64'd42) begin
      failures++;
      $display("FAIL 7 x 6 gave %0d", c);
    end

    for (int k = 0; k < 5; k++) begin
      checks++;
      if (digit_seen[k] == 0) begin
        failures++;
        $display("FAIL Booth digit class %0d never occurred", k);
      end
    end
    checks++;
    if (neg_products == 0 || pos_products == 0 || back_to_back < 2) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("digits 0:%0d +1:%0d -1:%0d +2:%0d -2:%0d, negative products %0d, positive %0d, back-to-back %0d",
             digit_seen[0], digit_seen[1], digit_seen[2], digit_seen[3], digit_seen[4],
             neg_products, pos_products, back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_finite_field_mul_ppa
