// tb_mbe_encoder: self-checking testbench for the radix-4 Booth encoder.
//
// For corner values and random multipliers it checks, for each digit, that
// the control word is well formed (never both one and two; a zero digit has
// no neg) and that the digit it stands for equals -2*b[2i+1] + b[2i] + b[2i-1],
// worked out here from the multiplier bits. It also checks the recoding as a
// whole: sum of d_i * 4^i must give the signed multiplier back. Runs at the
// default N = 32 and at N = 8 (exhaustive).
module tb_mbe_encoder;
  import ffm_pkg::*;

  int checks   = 0;
  int failures = 0;

  localparam int unsigned N  = 32;
  localparam int unsigned NS = 8;

  logic        [N-1:0]    mr;
  booth_ctrl_t [N/2-1:0]  digit;
  logic        [NS-1:0]   mr_s;
  booth_ctrl_t [NS/2-1:0] digit_s;

  mbe_encoder #(.N(N))  dut   (.mr(mr),   .digit(digit));
  mbe_encoder #(.N(NS)) dut_s (.mr(mr_s), .digit(digit_s));

  function automatic int ctrl_value(booth_ctrl_t c);
    int v;
    v = c.two ? 2 : (c.one ? 1 : 0);
    return c.neg ? -v : v;
  endfunction

  task automatic check_wide(logic [N-1:0] v);
    longint recon;
    int     bm1, expd;
    mr = v;
    #1;
    recon = 0;
    for (int i = 0; i < N/2; i++) begin
      bm1  = (i == 0) ? 0 : int'(v[2*i-1]);
      expd = -2 * int'(v[2*i+1]) + int'(v[2*i]) + bm1;
      checks++;
      if ((digit[i].one && digit[i].two) || (!digit[i].one && !digit[i].two && digit[i].neg)
          || ctrl_value(digit[i]) != expd) begin
        failures++;
        $display("FAIL N=%0d mr=%h digit %0d ctrl=%b expected %0d", N, v, i, digit[i], expd);
      end
      recon += longint'(ctrl_value(digit[i])) <<< (2 * i);
    end
    checks++;
    if (recon != longint'($signed(v))) begin
      failures++;
      $display("FAIL N=%0d mr=%h recoded to %0d", N, v, recon);
    end
  endtask

  initial begin
    logic [N-1:0] corners [6];
    corners = '{32'h0, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h5555_5555, 32'hAAAA_AAAA};
    foreach (corners[k]) check_wide(corners[k]);
    repeat (2000) check_wide($urandom());

    // Exhaustive at N = 8.
    for (int v = 0; v < 256; v++) begin
      longint recon;
      mr_s = NS'(v);
      #1;
      recon = 0;
      for (int i = 0; i < NS/2; i++) recon += longint'(ctrl_value(digit_s[i])) <<< (2 * i);
      checks++;
      if (recon != longint'($signed(mr_s))) begin
        failures++;
        $display("FAIL N=%0d mr=%h recoded to %0d", NS, mr_s, recon);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule : tb_mbe_encoder
