// tb_crin_scan_chain: self-checking testbench of crin_scan_chain.
//
// Shifts random bits into the default 7-cell chain with `shift_en` randomly
// gated, keeps a list of the bits that went in, and checks after every clock
// that cell i holds the i-th most recent bit shifted in and that `scan_out`
// is cell 6. It also checks the reset value.
module tb_crin_scan_chain;
  localparam int LEN = 7;
  logic clk = 0, rst_n = 0, shift_en = 0, scan_in = 0, scan_out;
  logic [LEN-1:0] cells;
  bit hist [$];
  int checks = 0, failures = 0, shifts = 0;

  crin_scan_chain u_dut (.clk, .rst_n, .shift_en, .scan_in, .scan_out, .cells);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    checks++;
    if (cells != '0) begin failures++; $display("FAIL: reset"); end
    for (int i = 0; i < LEN; i++) hist.push_front(1'b0);
    #1 rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      shift_en = ($urandom_range(0, 3) != 0);
      scan_in  = 1'($urandom());
      @(posedge clk);
      if (shift_en) begin hist.push_front(scan_in); void'(hist.pop_back()); shifts++; end
      #1;
      for (int i = 0; i < LEN; i++) begin
        checks++;
        if (cells[i] != hist[i]) begin failures++; $display("FAIL: step %0d cell %0d", n, i); end
      end
      checks++;
      if (scan_out != hist[LEN-1]) begin failures++; $display("FAIL: scan_out step %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
