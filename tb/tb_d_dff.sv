// tb_d_dff -- self-checking testbench for the D flip-flop.
//
// Drives random Din, Set and Reset values around rising clock edges and
// compares Dout and Ndout with a reference written here: Dout follows Din at a
// rising edge, Reset clears and Set sets immediately (between edges), Reset
// winning over Set. Checks are made both right after clock edges and right
// after asynchronous control changes while the clock is steady, so a
// synchronous-only set or reset fails.
`timescale 1ns/1ps
module tb_d_dff;

  logic Clk = 1'b0, Din = 1'b0, Set = 1'b0, Reset = 1'b0;
  logic Dout, Ndout;
  logic expected;
  int checks = 0, failures = 0;
  int n_async_reset = 0, n_async_set = 0, n_capture = 0;

  d_dff dut (.Clk, .Din, .Set, .Reset, .Dout, .Ndout);

  task automatic check(input string what);
    checks++;
    if (Dout !== expected || Ndout !== ~expected) begin
      failures++;
      $display("FAIL %s at %0t: Dout=%b Ndout=%b expected %b", what, $time, Dout, Ndout, expected);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // asynchronous reset with the clock held low
    #1 Reset = 1'b1;
    #1 expected = 1'b0; check("initial reset");
    Reset = 1'b0;
    for (int i = 0; i < 400; i++) begin
      // phase 1: clock low, change data and maybe pulse a control
      Din = 1'($urandom);
      #1;
      case ($urandom_range(0, 6))
        0: begin Reset = 1'b1; #1; expected = 1'b0; check("async reset"); n_async_reset++;
                 Reset = 1'b0; end
        1: begin Set = 1'b1; #1; expected = 1'b1; check("async set"); n_async_set++;
                 Set = 1'b0; end
        2: begin Set = 1'b1; Reset = 1'b1; #1; expected = 1'b0; check("reset over set");
                 Set = 1'b0; Reset = 1'b0; #1; check("released together"); end
        3: begin Set = 1'b1; #1; expected = 1'b1; check("set before reset");
                 Reset = 1'b1; #1; expected = 1'b0; check("reset while set held");
                 Set = 1'b0; Reset = 1'b0; #1; check("released together"); n_async_reset++; end
        default: ;
      endcase
      #1;
      check("hold before edge");
      // phase 2: rising edge captures Din
      Clk = 1'b1;
      #1; expected = Din; check("capture"); n_capture++;
      // data changes while clock high must not be seen
      Din = ~Din;
      #1; check("no capture while high");
      #2 Clk = 1'b0;
      #1; check("no capture on falling edge");
    end
    if (n_async_reset == 0) begin failures++; $display("FAIL no async reset exercised"); end
    if (n_async_set == 0)   begin failures++; $display("FAIL no async set exercised"); end
    $display("async resets=%0d async sets=%0d captures=%0d", n_async_reset, n_async_set, n_capture);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
