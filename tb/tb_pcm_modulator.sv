// tb_pcm_modulator: self-checking test of the pulse-count modulator.
//
// Two instances run from one clock and reset: the default 9-bit modulator
// and a 4-bit one (the 16-slot example that illustrates the two schemes). Codes
// change only at period boundaries. Every clock the pin is compared with a
// testbench model (pin high in slot s iff reverse(s) < code, one clock
// after the counter, reverse computed by the testbench), and per period:
//   - the number of high clocks equals the code (same duty as PWM),
//   - for the 4-bit instance, the slot masks of codes 0, 1, 2, 3, 4, 8 and
//     15 equal hand-written patterns of the 4-bit PCM example
//     (written out slot by slot, not computed),
//   - for code 2^(m-1) the pin toggles every clock (2^(m-1) pulses, no
//     run longer than one clock), the highest switching rate,
//   - the longest high run never exceeds what the spread pattern allows.
module tb_pcm_modulator;
  localparam int unsigned MA = 9;
  localparam int unsigned NA = 1 << MA;
  localparam int unsigned MB = 4;
  localparam int unsigned NB = 1 << MB;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic [MA-1:0] code_a = '0;
  logic [MB-1:0] code_b = '0;
  logic          out_a, out_b, ps_a, ps_b;
  int            checks = 0, failures = 0;

  pcm_modulator              dut_a (.clk(clk), .rst_n(rst_n), .code(code_a), .pcm_out(out_a), .period_start(ps_a));
  pcm_modulator #(.M(MB))    dut_b (.clk(clk), .rst_n(rst_n), .code(code_b), .pcm_out(out_b), .period_start(ps_b));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int unsigned rev(input int unsigned v, input int unsigned m);
    int unsigned r = 0;
    for (int unsigned i = 0; i < m; i++) if (((v >> i) & 1) != 0) r |= 1 << (m - 1 - i);
    return r;
  endfunction

  // Slot patterns of the 4-bit PCM example (bit s = slot s).
  function automatic logic [15:0] fig_mask(input int unsigned c);
    case (c)
      0:  return 16'h0000;
      1:  return 16'h0001;  // one pulse at the start
      2:  return 16'h0101;  // slots 0 and 8
      3:  return 16'h0111;  // slots 0, 4, 8
      4:  return 16'h1111;  // every fourth slot
      8:  return 16'h5555;  // every other slot
      15: return 16'h7FFF;  // all but the last slot
      default: return 16'hxxxx;
    endcase
  endfunction

  int unsigned codes_a[$] = '{0, 1, 256, 2, 511, 128, 384, 255};

  initial begin
    int unsigned cnt;
    int unsigned ncodes;
    bit          exp_a, exp_b;
    int unsigned pin_code_a, pin_code_b;
    int unsigned highs_a, highs_b, rises_a, run_a, maxrun_a;
    bit          prev_a;
    logic [NB-1:0] mask_b;

    for (int i = 0; i < 6; i++) codes_a.push_back($urandom_range(NA - 1));
    ncodes = codes_a.size();

    repeat (3) @(negedge clk);
    check(out_a == 0 && out_b == 0, "pins low in reset");
    rst_n = 1'b1;
    cnt = 0;
    exp_a = 0; exp_b = 0;
    highs_a = 0; highs_b = 0; rises_a = 0; prev_a = 0; run_a = 0; maxrun_a = 0;
    mask_b = '0; pin_code_a = 0; pin_code_b = 0;

    for (int unsigned t = 0; t < ncodes * NA + 1; t++) begin
      if (t > 0) begin
        int unsigned slot_a, slot_b;
        slot_a = (cnt + NA - 1) % NA;
        slot_b = slot_a % NB;
        check(out_a == exp_a, "9-bit pin matches model");
        check(out_b == exp_b, "4-bit pin matches model");
        check(ps_a == (slot_a == 0), "9-bit period_start");
        check(ps_b == (slot_b == 0), "4-bit period_start");
        if (out_a) begin
          highs_a++;
          run_a++;
          if (run_a > maxrun_a) maxrun_a = run_a;
        end else begin
          run_a = 0;
        end
        if (out_a && !prev_a) rises_a++;
        prev_a = out_a;
        if (out_b) highs_b++;
        mask_b[slot_b] = out_b;
        if (slot_b == NB - 1) begin
          check(highs_b == pin_code_b, "4-bit duty count");
          if (pin_code_b inside {0, 1, 2, 3, 4, 8, 15})
            check(mask_b == fig_mask(pin_code_b), "4-bit slot pattern (PCM)");
          highs_b = 0;
        end
        if (slot_a == NA - 1) begin
          check(highs_a == pin_code_a, "9-bit duty count");
          if (pin_code_a == NA / 2) begin
            check(rises_a == NA / 2, "mid-scale code toggles every clock");
            check(maxrun_a == 1, "mid-scale code has no run longer than one clock");
          end
          // The z = 2^m - code low slots are those whose reversed index
          // lies in [code, 2^m); that range holds an aligned block of at
          // least z/4 reversed values, i.e. slots spaced at most 4*2^m/z
          // apart, so no high run reaches 4*2^m/z clocks. PWM would give a
          // single run of `code` clocks.
          check(maxrun_a * (NA - pin_code_a) < 4 * NA, "high runs are short");
          highs_a = 0; rises_a = 0; maxrun_a = 0; run_a = 0;
        end
      end
      if (t == ncodes * NA) break;
      if (cnt % NB == 0) begin
        code_b     = MB'((cnt / NB) % NB);
        pin_code_b = int'(code_b);
      end
      if (cnt == 0) begin
        code_a     = MA'(codes_a[t / NA]);
        pin_code_a = int'(code_a);
      end
      exp_a = (rev(cnt, MA) < code_a);
      exp_b = (rev(cnt % NB, MB) < code_b);
      @(negedge clk);
      cnt = (cnt + 1) % NA;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40 * NA) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
