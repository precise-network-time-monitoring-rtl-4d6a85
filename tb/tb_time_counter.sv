// tb_time_counter: with a short second (CPS = 50 cycles), checks counting,
// the wrap into the seconds counter with a pps pulse, and the load of a
// new time (the loaded value belongs to the loading edge).
`timescale 1ns/1ps
module tb_time_counter;
  import pntm_pkg::*;
  localparam int CPS = 50;
  logic clk = 0, rst_n = 0, set = 0;
  logic [SEC_W-1:0] set_sec = '0, sec;
  logic [CYC_W-1:0] set_cycles = '0, cycles;
  logic pps;
  int checks = 0, failures = 0;
  longint t_ref;        // model: total cycles
  bit run = 0;

  time_counter #(.CYCLES_PER_SEC(CPS)) dut (.clk_a(clk), .rst_n, .set, .set_sec, .set_cycles, .sec, .cycles, .pps);
  always #8 clk = ~clk;

  always @(posedge clk) begin
    #1;
    if (run) begin
      if (set) t_ref = longint'(set_sec) * CPS + set_cycles;
      else     t_ref++;
      checks++;
      if (sec != SEC_W'(t_ref / CPS) || cycles != CYC_W'(t_ref % CPS) ||
          pps != (!set && t_ref % CPS == 0)) begin
        failures++;
        $display("FAIL time %0d.%0d pps %0d, expected %0d.%0d", sec, cycles, pps, t_ref / CPS, t_ref % CPS);
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk) begin set = 1; set_sec = 0; set_cycles = 0; run = 1; end
    @(negedge clk) set = 0;
    repeat (130) @(posedge clk);
    @(negedge clk) begin set = 1; set_sec = 1234; set_cycles = CPS - 3; end
    @(negedge clk) set = 0;
    repeat (120) @(posedge clk);
    @(negedge clk) begin set = 1; set_sec = 7; set_cycles = 10; end
    @(negedge clk) set = 0;
    repeat (60) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
