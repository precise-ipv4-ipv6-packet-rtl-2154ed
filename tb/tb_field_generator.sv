// Testbench of field_generator: constant, sequence (with its restart at
// "from" after passing "to") and random mode (every value inside [from,to],
// both ends of the range approached, mean near the middle), for a 16-bit and
// a 128-bit field.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_field_generator;
  import pg_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  field_mode_e mode, mode_w;
  logic [15:0] from, to, inc, value;
  logic [127:0] from_w, to_w, inc_w, value_w;
  logic restart = 0, next = 0;

  field_generator #(.WIDTH(16)) dut (.clk, .rst, .mode, .from, .to, .inc,
                                     .restart, .next, .value);
  field_generator #(.WIDTH(128)) dutw (.clk, .rst, .mode(mode_w), .from(from_w), .to(to_w),
                                       .inc(inc_w), .restart, .next, .value(value_w));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end

  task automatic pulse_restart; restart <= 1; @(posedge clk); restart <= 0; @(posedge clk); endtask
  task automatic pulse_next;    next <= 1;    @(posedge clk); next <= 0;    @(posedge clk); endtask

  int exp, sum, vmin, vmax;
  initial begin
    mode = FM_CONST; from = 16'd1234; to = 16'd0; inc = 16'd0;
    mode_w = FM_RANDOM; from_w = 128'h2001_0DB8_0000_0000_0000_0000_0000_0000;
    to_w = 128'h2001_0DB8_0000_0000_0000_0000_FFFF_FFFF; inc_w = '0;
    repeat (3) @(posedge clk); rst <= 0; @(posedge clk);
    // constant
    pulse_restart;
    `CHECK(value == 16'd1234, "const value")
    pulse_next;
    `CHECK(value == 16'd1234, "const value after next")
    from = 16'd999; #1;
    `CHECK(value == 16'd999, "const follows from")
    // sequence 10,17,24,31,38,10,...
    mode = FM_SEQ; from = 16'd10; to = 16'd40; inc = 16'd7;
    pulse_restart;
    exp = 10;
    for (int n = 0; n < 20; n++) begin
      `CHECK(value == 16'(exp), $sformatf("seq %0d: %0d expected %0d", n, value, exp))
      exp = (exp + 7 > 40) ? 10 : exp + 7;
      pulse_next;
    end
    // sequence that reaches "to" exactly: 0,5,10 then restart
    from = 16'd0; to = 16'd10; inc = 16'd5;
    pulse_restart;
    pulse_next; pulse_next;
    `CHECK(value == 16'd10, "seq reaches to")
    pulse_next;
    `CHECK(value == 16'd0, "seq restarts at from")
    // sequence near the top of the range does not overflow
    from = 16'hFFF0; to = 16'hFFFF; inc = 16'd8;
    pulse_restart; pulse_next;
    `CHECK(value == 16'hFFF8, "seq high")
    pulse_next;
    `CHECK(value == 16'hFFF0, "seq wrap without overflow")
    // random in [100,199]
    mode = FM_RANDOM; from = 16'd100; to = 16'd199;
    pulse_restart;
    sum = 0; vmin = 65535; vmax = 0;
    for (int n = 0; n < 2000; n++) begin
      if (value < 100 || value > 199) begin
        failures++; $display("random out of range %0d", value);
      end
      sum += value;
      if (value < vmin) vmin = value;
      if (value > vmax) vmax = value;
      if (value_w < from_w || value_w > to_w) begin
        failures++; $display("wide random out of range %h", value_w);
      end
      pulse_next;
    end
    checks += 2;
    `CHECK(vmin <= 102 && vmax >= 197, $sformatf("random range covered %0d..%0d", vmin, vmax))
    `CHECK(sum / 2000 > 145 && sum / 2000 < 155, $sformatf("random mean %0d", sum / 2000))
    // full range: from=0,to=FFFF
    from = 16'd0; to = 16'hFFFF;
    vmax = 0;
    for (int n = 0; n < 200; n++) begin pulse_next; if (value > vmax) vmax = value; end
    `CHECK(vmax > 16'hF000, "full range random")
    `TB_FINISH
  end
endmodule
