// tb_crc74_paper_run -- replays the reference transient run of the CRC (7,4)
// encoder with its original timing, in seconds, at default parameters.
//
// Stimulus, as in the reference run:
//   reset     high from 0 s to 5 s
//   clock     low until 10 s, then period 20 s, 50 % duty (rising at 10, 30, ..., 130 s)
//   serial_in augmented word 1001000, one bit per 20 s from 0 s
//             (high 0-20 s and 60-80 s, low otherwise)
//   dv        dv2=0, dv1=1, dv0=1 (divisor 1011)
// Expected outputs, sampled every second from 1 s to 149 s:
//   rm2 high 50-70, 90-110 and 130-150 s
//   rm1 high 30-50, 70-90 and 110-150 s
//   rm0 high 10-30 and 110-130 s
// so the final remainder 110 appears at the 7th rising edge (130 s) and can
// be sampled anywhere from 130 s to 150 s. The number of rising edges seen
// before the remainder is complete is checked too.
`timescale 1s/1ms
module tb_crc74_paper_run;

  logic       clock = 1'b0;
  logic       reset = 1'b0;
  logic       serial_in = 1'b0;
  logic [2:0] dv = 3'b011;
  logic [2:0] rm;

  int checks = 0, failures = 0;
  int edges = 0, feedback_edges = 0;

  crc74_encoder dut (.clock, .reset, .serial_in, .dv, .rm);

  // reset pulse
  initial begin
    #0.1 reset = 1'b1;
    #4.9 reset = 1'b0;
  end

  // clock: delay 10 s, high 10 s, period 20 s
  initial begin
    #10;
    forever begin
      clock = 1'b1; #10;
      clock = 1'b0; #10;
    end
  end

  // serial_in: 1 0 0 1 0 0 0, each bit held for 20 s
  initial begin
    logic [6:0] word = 7'b1001000;
    for (int i = 6; i >= 0; i--) begin
      serial_in = word[i];
      #20;
    end
    serial_in = 1'b0;
  end

  always @(posedge clock) begin
    edges++;
    if (rm[2]) feedback_edges++;
  end

  function automatic logic [2:0] expected_at(input int t);
    logic [2:0] e;
    e[2] = (t >= 50 && t < 70) || (t >= 90 && t < 110) || (t >= 130);
    e[1] = (t >= 30 && t < 50) || (t >= 70 && t < 90) || (t >= 110);
    e[0] = (t >= 10 && t < 30) || (t >= 110 && t < 130);
    return e;
  endfunction

  initial begin : watchdog
    #400;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    for (int t = 1; t < 150; t++) begin
      #0.5;  // sample half a second after each whole second
      checks++;
      if (rm !== expected_at(t)) begin
        failures++;
        $display("FAIL at %0d.5 s: rm=%b expected %b", t, rm, expected_at(t));
      end
      if (t == 130) begin
        checks++;
        if (edges != 7 || rm !== 3'b110) begin
          failures++;
          $display("FAIL remainder not complete at the 7th edge: edges=%0d rm=%b", edges, rm);
        end
      end
      #0.5;
    end
    $display("rising edges=%0d with feedback=%0d final remainder=%b", edges, feedback_edges, rm);
    if (feedback_edges == 0) begin failures++; $display("FAIL no feedback step"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
