// tb_pp_gen: self-checking testbench for the Booth partial product generator.
//
// Drives each of the five legal control words (0, +1, -1, +2, -2) with corner
// and random multiplicands and compares the N+2 bit output, read as two's
// complement, with multiplicand * digit computed here in 64-bit arithmetic.
// Also counts how often each of the five multiplexer inputs was exercised.
module tb_pp_gen;
  import ffm_pkg::*;

  int checks   = 0;
  int failures = 0;

  localparam int unsigned N = 32;

  logic [N-1:0] md;
  booth_ctrl_t  ctrl;
  logic [N+1:0] pp;

  pp_gen #(.N(N)) dut (.md(md), .ctrl(ctrl), .pp(pp));

  // neg, two, one for digits 0, +1, -1, +2, -2.
  localparam logic [2:0] CTRLS [5] = '{3'b000, 3'b001, 3'b101, 3'b010, 3'b110};
  localparam int         DIGS  [5] = '{0, 1, -1, 2, -2};
  int seen [5] = '{default: 0};

  task automatic check(logic [N-1:0] m);
    longint expd, got;
    for (int k = 0; k < 5; k++) begin
      md   = m;
      ctrl = CTRLS[k];
      #1;
      expd = longint'($signed(m)) * DIGS[k];
      got  = longint'($signed(pp));
      checks++;
      seen[k]++;
      if (got != expd) begin
        failures++;
        $display("FAIL md=%h digit=%0d pp=%h (%0d) expected %0d", m, DIGS[k], pp, got, expd);
      end
    end
  endtask

  initial begin
    check('0);
    check('1);
    check(32'h8000_0000);
    check(32'h7FFF_FFFF);
    check(32'h0000_0003);
    repeat (2000) check($urandom());
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (seen[k] == 0) begin
        failures++;
        $display("FAIL digit %0d never selected", DIGS[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_pp_gen
