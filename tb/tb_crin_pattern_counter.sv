// tb_crin_pattern_counter: self-checking testbench of crin_pattern_counter.
//
// Chain length 3, 8-bit counts. The testbench plays the configuration counter
// and the stored control bits: it supplies presets {4, 1, 9} for three
// configurations, counts the `advance` pulses and raises `halt` after the third.
// It checks that each pattern has exactly 3 shift cycles followed by one
// capture cycle, that `advance` comes with the last capture of each
// configuration and only then, that `remaining` counts down, and that the
// session keeps `busy` high for 3 + 14*(3+1) + 1 = 60 cycles (three preset
// cycles, 14 patterns, and the final LOAD cycle that sees `halt`).
// A second session is run with presets {2, 2, 2}.
module tb_crin_pattern_counter;
  localparam int LEN = 3;
  logic clk = 0, rst_n = 0, start = 0, halt = 0;
  logic [7:0] preset, remaining;
  logic busy, shift_en, capture, advance;
  int checks = 0, failures = 0;
  int presets [3];
  int cfg;

  crin_pattern_counter #(.CHAIN_LEN(LEN), .PCNT_W(8)) u_dut (
    .clk, .rst_n, .start, .halt, .preset, .busy, .shift_en, .capture, .advance, .remaining);

  always #5 clk = ~clk;
  assign preset = 8'(presets[cfg < 3 ? cfg : 2]);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic session(input int p0, input int p1, input int p2);
    int cycles = 0, shifts_in_pattern = 0, patterns = 0, left = 0;
    bit loading = 1;
    presets = '{p0, p1, p2};
    cfg = 0;
    halt = 0;
    start = 1;
    @(posedge clk); #1;
    start = 0;
    check(busy, "busy after start");
    while (busy && cycles < 1000) begin
      cycles++;
      if (loading) begin
        check(!shift_en && !capture, "load cycle is idle");
        left = (cfg < 3) ? presets[cfg] : 0;
        loading = 0;
        if (cfg == 3) begin
          @(posedge clk); #1;
          break;
        end
      end else if (shift_en) begin
        check(!capture, "no capture while shifting");
        shifts_in_pattern++;
      end else begin
        check(capture, "either shift or capture after load");
        check(shifts_in_pattern == LEN, $sformatf("pattern had %0d shifts", shifts_in_pattern));
        check(int'(remaining) == left, $sformatf("remaining %0d expected %0d", remaining, left));
        check(advance == (left == 1), "advance on last pattern only");
        shifts_in_pattern = 0;
        patterns++;
        left--;
        if (advance) begin
          loading = 1;
          cfg++;
          if (cfg == 3) halt = 1;
        end
      end
      @(posedge clk); #1;
    end
    check(!busy, "idle after halt");
    check(patterns == p0 + p1 + p2, $sformatf("%0d patterns", patterns));
    check(cycles == 3 + (p0 + p1 + p2) * (LEN + 1) + 1,
          $sformatf("session took %0d cycles, expected %0d", cycles, 3 + (p0+p1+p2)*(LEN+1) + 1));
  endtask

  initial begin
    cfg = 0;
    presets = '{1, 1, 1};
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(!busy && !shift_en && !capture, "reset state");
    session(4, 1, 9);
    repeat (3) @(posedge clk);
    #1 check(!busy, "stays idle");
    session(2, 2, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
