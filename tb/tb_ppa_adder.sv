// tb_ppa_adder: self-checking testbench for the parallel prefix adder.
//
// Compares sum and carry out of the default 64-bit adder against 65-bit
// addition done here, for corner cases (full carry ripple, all propagate,
// all generate) and random operands. A 13-bit instance, not a power of two,
// is checked exhaustively over a strided sweep to exercise the pass-through
// and gray cells at a ragged top.
module tb_ppa_adder;

  int checks   = 0;
  int failures = 0;

  localparam int unsigned W  = 64;
  localparam int unsigned WS = 13;

  logic [W-1:0]  a, b, sum;
  logic          cout;
  logic [WS-1:0] as, bs, sums;
  logic          couts;

  ppa_adder #(.WIDTH(W))  dut   (.a(a),  .b(b),  .sum(sum),  .cout(cout));
  ppa_adder #(.WIDTH(WS)) dut_s (.a(as), .b(bs), .sum(sums), .cout(couts));

  task automatic check(logic [W-1:0] x, logic [W-1:0] y);
    logic [W:0] expd;
    a = x;
    b = y;
    #1;
    expd = {1'b0, x} + {1'b0, y};
    checks++;
    if ({cout, sum} != expd) begin
      failures++;
      $display("FAIL %h + %h = %b_%h expected %h", x, y, cout, sum, expd);
    end
  endtask

  initial begin
    check('0, '0);
    check('1, 64'd1);
    check('1, '1);
    check('1, '0);
    check(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000);
    check(64'h5555_5555_5555_5555, 64'hAAAA_AAAA_AAAA_AAAB);
    check(64'h7FFF_FFFF_FFFF_FFFF, 64'd1);
    for (int i = 0; i < W; i++) check(64'd1 << i, (64'd1 << i) - 1);
    repeat (5000) check({$urandom(), $urandom()}, {$urandom(), $urandom()});

    for (int x = 0; x < (1 << WS); x += 7) begin
      for (int y = 0; y < (1 << WS); y += 13) begin
        logic [WS:0] e;
        as = WS'(x);
        bs = WS'(y);
        #1;
        e = {1'b0, as} + {1'b0, bs};
        checks++;
        if ({couts, sums} != e) begin
          failures++;
          $display("FAIL W=%0d %h + %h = %h expected %h", WS, as, bs, {couts, sums}, e);
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_ppa_adder
