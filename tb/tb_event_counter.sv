// tb_event_counter -- self-checking test of the 24-bit rate meter.
//
// Drives random event pulses with counting enabled and disabled, clears the
// counter, and preloads it near the top by counting to check saturation
// (with a narrow counter). A reference count kept in the testbench is
// compared with the counter and its three bytes every clock.
module tb_event_counter;
  localparam int W = 24;
  logic clk = 0, rst_n = 0;
  logic ev = 0, en = 0, clr = 0;
  logic [W-1:0] count;
  logic [7:0] b0, b1, b2;
  logic [3:0] c4;
  logic [7:0] s0, s1, s2;
  int checks = 0, failures = 0;
  longint ref_cnt = 0;
  int ref4 = 0;

  event_counter #(.W(W)) dut (.clk, .rst_n, .event_i(ev), .enable(en), .clear(clr),
                              .count, .count_b0(b0), .count_b1(b1), .count_b2(b2));
  event_counter #(.W(4)) dut4 (.clk, .rst_n, .event_i(ev), .enable(1'b1), .clear(clr),
                               .count(c4), .count_b0(s0), .count_b1(s1), .count_b2(s2));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: count=%0d ref=%0d", what, count, ref_cnt);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int phase = 0; phase < 6; phase++) begin
      for (int i = 0; i < 3000; i++) begin
        @(negedge clk);
        ev  = ($urandom % 3) == 0;
        en  = (phase != 2) && (($urandom % 8) != 0);
        clr = (phase == 4 && i == 100);
        @(posedge clk);
        if (clr) begin ref_cnt = 0; ref4 = 0; end
        else begin
          if (ev && en && ref_cnt != (1 << W) - 1) ref_cnt++;
          if (ev && ref4 != 15) ref4++;
        end
        #1;
        check(count == W'(ref_cnt), "count");
        check({b2, b1, b0} == 24'(ref_cnt), "bytes");
        check(c4 == 4'(ref4), "saturating 4-bit counter");
      end
    end
    check(ref4 == 15, "saturation reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
