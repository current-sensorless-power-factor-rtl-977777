// tb_sd_updown_counter: random up/down/enable stimulus against a saturating
// reference count, plus forced runs into both saturation limits.
module tb_sd_updown_counter;
  localparam int unsigned M = 6;
  logic clk = 0, rst_n = 0, en = 0, up = 0;
  logic [M-1:0] count;
  int checks = 0, failures = 0;
  int ref_cnt;
  int hit_top = 0, hit_bot = 0;

  sd_updown_counter #(.M(M)) dut (.clk, .rst_n, .en, .up, .count);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic e, input logic u);
    en = e; up = u;
    @(posedge clk); #1;
    if (e) begin
      if (u && ref_cnt < (1 << M) - 1) ref_cnt++;
      else if (!u && ref_cnt > 0) ref_cnt--;
    end
    if (ref_cnt == (1 << M) - 1) hit_top++;
    if (ref_cnt == 0) hit_bot++;
    checks++;
    if (int'(count) != ref_cnt) begin
      failures++;
      $display("mismatch: count=%0d expected %0d", count, ref_cnt);
    end
  endtask

  initial begin
    ref_cnt = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    checks++; if (count != 0) failures++;
    repeat (100) step(1'b1, 1'b1);          // into the top limit
    repeat (5000) step($urandom_range(0, 3) != 0, $urandom_range(0, 1) == 1);
    repeat (100) step(1'b1, 1'b0);          // into the bottom limit
    repeat (5000) step($urandom_range(0, 3) != 0, $urandom_range(0, 1) == 1);
    checks++; if (hit_top < 30 || hit_bot < 30) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
