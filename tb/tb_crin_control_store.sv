// tb_crin_control_store: self-checking testbench of crin_control_store.
//
// The default store must hold 11 counts of 17 bits that add up to 186503 and
// differ by at most one (16955 for configurations 0..8, 16954 for 9 and 10);
// codes 11..15 read 0. A second instance with explicit contents
// {5, 1, 300, 7} (4 configurations, 9 bits) must return them in order.
module tb_crin_control_store;
  logic [3:0]  cfg;
  logic [16:0] count;
  logic [1:0]  cfg_b;
  logic [8:0]  count_b;
  int checks = 0, failures = 0;
  localparam int EXP_B [4] = '{5, 1, 300, 7};

  crin_control_store u_dut (.cfg, .count);
  crin_control_store #(.NUM_CFG(4), .PCNT_W(9),
                       .CONTENTS({9'd7, 9'd300, 9'd1, 9'd5})) u_b (.cfg(cfg_b), .count(count_b));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sum = 0;
    for (int c = 0; c < 16; c++) begin
      cfg = 4'(c);
      #1;
      if (c < 11) begin
        check(int'(count) == ((c < 9) ? 16955 : 16954), $sformatf("cfg %0d count %0d", c, count));
        sum += int'(count);
      end else begin
        check(count == 0, $sformatf("unused code %0d reads %0d", c, count));
      end
    end
    check(sum == 186503, $sformatf("total %0d", sum));
    for (int c = 0; c < 4; c++) begin
      cfg_b = 2'(c);
      #1;
      check(int'(count_b) == EXP_B[c], $sformatf("explicit cfg %0d count %0d", c, count_b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
