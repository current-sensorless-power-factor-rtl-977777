// tb_sd_modulator: the stream must carry exactly din ones in every window of
// 2^M clocks while din is held, and must match a carry-out reference model
// bit by bit.
module tb_sd_modulator;
  localparam int unsigned M = 13;
  logic clk = 0, rst_n = 0;
  logic [M-1:0] din = '0;
  logic bitstream;
  int checks = 0, failures = 0;
  int ref_acc = 0, ref_bit = 0, bit_err = 0;

  sd_modulator #(.M(M)) dut (.clk, .rst_n, .din, .bitstream);

  always #5 clk = ~clk;

  // Reference: accumulate din, the carry is the next stream bit.
  always @(posedge clk) begin
    if (rst_n) begin
      ref_bit <= ((ref_acc + int'(din)) >> M) & 1;
      ref_acc <= (ref_acc + int'(din)) & ((1 << M) - 1);
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (int'(bitstream) != ref_bit) begin
        bit_err++;
        failures++;
      end
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones;
    int values[6];
    values = '{0, 1, 4096, 1000, 8191, 0};
    values[5] = int'($urandom_range(1, 8190));
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (values[k]) begin
      @(negedge clk);
      din = M'(values[k]);
      @(posedge clk);                      // first carry of the new word
      ones = 0;
      for (int i = 0; i < (1 << M); i++) begin
        @(posedge clk); #1;
        ones += int'(bitstream);
      end
      checks++;
      if (ones != values[k]) begin
        failures++;
        $display("din=%0d: %0d ones in 2^M clocks", values[k], ones);
      end
    end
    if (bit_err != 0) $display("%0d stream bits differ from the reference", bit_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
