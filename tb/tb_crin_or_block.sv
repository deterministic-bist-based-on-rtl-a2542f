// tb_crin_or_block: self-checking testbench of crin_or_block.
//
// Drives the default 32-input block with random LFSR words and compares every
// output with the OR of its two taps (stage i and stage (i+15) mod 32). It
// also counts zeros over all outputs: the OR of two fair bits is 0 a quarter of
// the time, so the measured fraction must lie between 0.22 and 0.28.
module tb_crin_or_block;
  localparam int L = 32;
  logic [L-1:0] lfsr, weighted;
  int checks = 0, failures = 0;
  longint ones = 0, total = 0;

  crin_or_block u_dut (.lfsr, .weighted);

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      lfsr = (n < 2) ? {L{n[0]}} : $urandom();
      #1;
      for (int i = 0; i < L; i++) begin
        checks++;
        if (weighted[i] !== (lfsr[i] || lfsr[(i + 15) % L])) begin
          failures++;
          $display("FAIL: word %08h output %0d = %b", lfsr, i, weighted[i]);
        end
        ones += !weighted[i];
        total++;
      end
    end
    checks++;
    if (ones * 100 < total * 22 || ones * 100 > total * 28) begin
      failures++;
      $display("FAIL: fraction of zeros %0d/%0d", ones, total);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
