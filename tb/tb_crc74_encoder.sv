// tb_crc74_encoder -- end-to-end self-checking testbench of the serial
// CRC (7,4) encoder, at its default parameters.
//
// Parts:
//  1. Worked example: data word 1001, divisor 1011. The register contents
//     after every one of the 7 clock edges are compared with the step-by-step
//     division table (000 -> 001 -> 010 -> 100 -> 010 -> 100 -> 011 -> 110), so
//     the remainder 110 must appear exactly at the 7th edge, not earlier.
//  2. Codebook: all 16 data words with divisor 1011; the remainder must equal
//     the low 3 bits of the listed code word. Each code word is then fed back
//     in serially and must leave a zero remainder (the receiver's syndrome),
//     and every single-bit corruption of it must leave a non-zero one.
//  3. Random words for all 8 divisors against a long-division reference model
//     (crc_pkg::crc_remainder) and against a bit-serial model of the three
//     recurrence equations.
//  4. Asynchronous reset in the middle of a word clears the register at once.
// Counts how often the register shifted with feedback (rm[2]=1), shifted
// without it, was reset mid-word, accepted a word and detected an error;
// a mechanism that never happened counts as a failure.
`timescale 1ns/1ps
module tb_crc74_encoder;
  import crc_pkg::*;

  localparam int unsigned R = CRC_R;
  localparam int unsigned N = CRC_N;
  localparam time T = 20ns;

  logic         clock = 1'b0;
  logic         reset = 1'b0;
  logic         serial_in = 1'b0;
  logic [R-1:0] dv = '0;
  logic [R-1:0] rm;

  int checks = 0, failures = 0;
  int n_feedback = 0, n_shift = 0, n_midreset = 0, n_accept = 0, n_detect = 0;

  crc74_encoder dut (.clock, .reset, .serial_in, .dv, .rm);

  always #(T/2) clock = ~clock;

  // Codebook: data word d -> code word, as listed for divisor 1011.
  localparam logic [6:0] CODEBOOK [16] = '{
    7'b0000000, 7'b0001011, 7'b0010110, 7'b0011101,
    7'b0100111, 7'b0101100, 7'b0110001, 7'b0111010,
    7'b1000101, 7'b1001110, 7'b1010011, 7'b1011000,
    7'b1100010, 7'b1101001, 7'b1110100, 7'b1111111};

  task automatic expect_eq(input logic [R-1:0] got, input logic [R-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: rm=%b expected %b", what, $time, got, exp);
    end
  endtask

  // Asynchronous reset pulse while the clock is high, so that the next
  // rising edge is the first one of the new word.
  task automatic do_reset();
    @(posedge clock);
    #2 reset = 1'b1;
    #2 reset = 1'b0;
  endtask

  // Shift one bit in: set it up at the falling edge, sample after the rise.
  task automatic shift_bit(input logic b);
    @(negedge clock);
    serial_in = b;
    if (rm[R-1] && dv != '0) n_feedback++; else n_shift++;
    @(posedge clock);
    #1;
  endtask

  // Feed a 7-bit word MSB first, then return the remainder.
  task automatic run_word(input logic [N-1:0] w, input logic [R-1:0] d, output logic [R-1:0] rem);
    dv = d;
    do_reset();
    for (int i = N - 1; i >= 0; i--) shift_bit(w[i]);
    rem = rm;
  endtask

  // Bit-serial model of the three recurrence equations.
  function automatic logic [R-1:0] step_model(input logic [R-1:0] s, input logic b, input logic [R-1:0] d);
    logic [R-1:0] n;
    n[0] = (s[2] & d[0]) ^ b;
    n[1] = (s[2] & d[1]) ^ s[0];
    n[2] = (s[2] & d[2]) ^ s[1];
    return n;
  endfunction

  initial begin : watchdog
    repeat (40000) @(posedge clock);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [R-1:0] rem, model;
    logic [N-1:0] w;
    logic [R-1:0] trace [N] = '{3'b001, 3'b010, 3'b100, 3'b010, 3'b100, 3'b011, 3'b110};
    logic [N-1:0] example = 7'b1001000;

    // ---- 1. worked example, edge by edge --------------------------------
    dv = CRC_DIVISOR_EXAMPLE[R-1:0];
    do_reset();
    #1 expect_eq(rm, '0, "example after reset");
    for (int i = 0; i < N; i++) begin
      shift_bit(example[N-1-i]);
      expect_eq(rm, trace[i], $sformatf("example after edge %0d", i + 1));
    end
    expect_eq(rm, 3'b110, "example remainder at 7th edge");
    // the remainder is held until the next edge
    @(negedge clock); #1 expect_eq(rm, 3'b110, "example remainder held before 8th edge");

    // ---- 2. codebook, syndrome and single-error detection ---------------
    for (int d = 0; d < 16; d++) begin
      checks++;
      if (CODEBOOK[d][6:3] != 4'(d)) begin
        failures++; $display("FAIL codebook row %0d data bits", d);
      end
      run_word({4'(d), 3'b000}, 3'b011, rem);
      expect_eq(rem, CODEBOOK[d][2:0], $sformatf("codebook remainder of %b", 4'(d)));
      run_word(CODEBOOK[d], 3'b011, rem);
      expect_eq(rem, '0, $sformatf("syndrome of code word %b", CODEBOOK[d]));
      if (rem == '0) n_accept++;
      for (int e = 0; e < N; e++) begin
        run_word(CODEBOOK[d] ^ (7'd1 << e), 3'b011, rem);
        checks++;
        if (rem == '0) begin
          failures++;
          $display("FAIL single error at bit %0d of %b not detected", e, CODEBOOK[d]);
        end else n_detect++;
      end
    end

    // ---- 3. random words, every divisor ---------------------------------
    for (int d = 0; d < 8; d++) begin
      for (int k = 0; k < 40; k++) begin
        w = N'($urandom);
        run_word(w, R'(d), rem);
        expect_eq(rem, crc_remainder(w, R'(d)), $sformatf("random %b divisor 1%03b", w, 3'(d)));
        model = '0;
        for (int i = N - 1; i >= 0; i--) model = step_model(model, w[i], R'(d));
        expect_eq(rem, model, "recurrence model");
      end
    end

    // ---- 4. asynchronous reset in the middle of a word ------------------
    for (int k = 0; k < 8; k++) begin
      dv = R'($urandom);
      do_reset();
      for (int i = 0; i < 3; i++) shift_bit(1'b1);
      @(negedge clock);
      #3 reset = 1'b1;
      #1 expect_eq(rm, '0, "mid-word reset clears before the next edge");
      n_midreset++;
      #1 reset = 1'b0;
    end

    // ---- mechanism coverage --------------------------------------------
    $display("feedback steps=%0d plain shifts=%0d mid-word resets=%0d accepted=%0d detected=%0d",
             n_feedback, n_shift, n_midreset, n_accept, n_detect);
    if (n_feedback == 0) begin failures++; $display("FAIL no feedback step"); end
    if (n_shift == 0)    begin failures++; $display("FAIL no plain shift"); end
    if (n_midreset == 0) begin failures++; $display("FAIL no mid-word reset"); end
    if (n_accept == 0)   begin failures++; $display("FAIL no word accepted"); end
    if (n_detect == 0)   begin failures++; $display("FAIL no error detected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
