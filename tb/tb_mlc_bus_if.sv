// tb_mlc_bus_if: self-checking test of the memory-mapped bus registers.
// Writes random values to every address, checks the register outputs and the
// read-back, checks that a write without cs or without we changes nothing and
// that the fault flag reads back at address 3.
module tb_mlc_bus_if;
  import svm_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cs, we, fault_flag;
  logic [1:0] addr;
  logic [U_W-1:0] wdata, rdata;
  logic signed [U_W-1:0] data_Ux, data_Uy;
  logic udc_c1_high;
  logic [2:0] i_dir;
  int checks = 0, failures = 0;

  mlc_bus_if dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic bus_write(input logic [1:0] a, input logic [U_W-1:0] d, input logic c, input logic w);
    @(negedge clk);
    cs = c; we = w; addr = a; wdata = d;
    @(negedge clk);
    cs = 1'b0; we = 1'b0;
  endtask

  logic [U_W-1:0] ex, ey;
  logic [3:0]     es;

  initial begin
    cs = 0; we = 0; addr = 0; wdata = 0; fault_flag = 0;
    repeat (2) @(negedge clk);
    check(data_Ux == 0 && data_Uy == 0 && udc_c1_high == 0 && i_dir == 0, "reset values");
    rst_n = 1'b1;
    for (int n = 0; n < 50; n++) begin
      ex = U_W'($urandom); ey = U_W'($urandom); es = 4'($urandom);
      bus_write(2'd0, ex, 1'b1, 1'b1);
      bus_write(2'd1, ey, 1'b1, 1'b1);
      bus_write(2'd2, {12'h0, es}, 1'b1, 1'b1);
      check(data_Ux == ex, "U_x register");
      check(data_Uy == ey, "U_y register");
      check({i_dir, udc_c1_high} == es, "status register");
      // ignored writes
      bus_write(2'd0, ~ex, 1'b0, 1'b1);
      bus_write(2'd1, ~ey, 1'b1, 1'b0);
      bus_write(2'd3, 16'hffff, 1'b1, 1'b1);
      check(data_Ux == ex && data_Uy == ey && {i_dir, udc_c1_high} == es, "no write without cs/we");
      addr = 2'd0; #1 check(rdata == ex, "read U_x");
      addr = 2'd1; #1 check(rdata == ey, "read U_y");
      addr = 2'd2; #1 check(rdata == {12'h0, es}, "read status");
      fault_flag = n[0];
      addr = 2'd3; #1 check(rdata == {15'h0, n[0]}, "read fault flag");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
