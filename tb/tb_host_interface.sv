// tb_host_interface: exercises the register bank on its own. Checks the
// reset values, write/read-back of the four settings registers, that a
// CTRL write produces single-cycle start and acknowledge pulses, that the
// status bits and result registers reflect the controller-side inputs, and
// that a negative amplitude is split into low word and sign-extended high
// word.
module tb_host_interface;
  import bist_pkg::*;
  localparam int L = 16, ACC_W = 33;

  logic clk = 0, rst_n = 0;
  logic [3:0] addr = '0;
  logic wr_en = 0;
  logic [31:0] wr_data = '0, rd_data;
  logic start_sweep, result_ack;
  logic [L-1:0] fcw_start, fcw_step, fcw_stop, settle;
  logic busy = 0, sweep_done = 0, result_valid = 0, result_timeout = 0;
  logic [L-1:0] result_fcw = '0, result_delay = '0, result_theta = '0;
  logic signed [ACC_W-1:0] result_amp = '0;
  int checks = 0, failures = 0;

  host_interface #(.L(L), .ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("%s", msg);
    end
  endtask

  task automatic write(input reg_addr_e a, input logic [31:0] v);
    @(negedge clk);
    addr = a; wr_data = v; wr_en = 1;
    @(negedge clk);
    wr_en = 0;
  endtask

  // Register read: the read port is combinational, so the value is taken
  // a moment after the address is applied.
  logic [31:0] r [10];
  task automatic read_all();
    for (int a = 0; a < 10; a++) begin
      addr = 4'(a);
      #1;
      r[a] = rd_data;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    read_all();
    check(r[REG_FCW_START] == 2 && r[REG_FCW_STEP] == 2, "FCW start/step reset values");
    read_all();
    check(r[REG_FCW_STOP] == 32768 && r[REG_SETTLE] == 16384, "FCW stop/settle reset values");
    write(REG_FCW_START, 32'h0000_0010);
    write(REG_FCW_STEP,  32'h0000_0008);
    write(REG_FCW_STOP,  32'h0001_0200);   // upper bits beyond L dropped
    write(REG_SETTLE,    32'h0000_1234);
    read_all();
    check(r[REG_FCW_START] == 32'h10 && fcw_start == 16'h10, "FCW_START");
    read_all();
    check(r[REG_FCW_STEP] == 32'h8 && fcw_step == 16'h8, "FCW_STEP");
    read_all();
    check(r[REG_FCW_STOP] == 32'h200 && fcw_stop == 16'h200, "FCW_STOP");
    read_all();
    check(r[REG_SETTLE] == 32'h1234 && settle == 16'h1234, "SETTLE");
    // Start pulse.
    @(negedge clk);
    addr = REG_CTRL; wr_data = 32'h1; wr_en = 1;
    @(negedge clk);
    wr_en = 0;
    check(start_sweep && !result_ack, "start pulse missing");
    @(negedge clk);
    check(!start_sweep, "start pulse longer than one cycle");
    // Ack pulse.
    write(REG_CTRL, 32'h2);
    check(result_ack && !start_sweep, "ack pulse missing");
    @(negedge clk);
    check(!result_ack, "ack pulse longer than one cycle");
    // Status and results.
    busy = 1; result_valid = 1; sweep_done = 0; result_timeout = 1;
    result_fcw = 16'd42; result_delay = 16'd17; result_theta = 16'hBEEF;
    result_amp = -ACC_W'(64'd5);
    read_all();
    check(r[REG_CTRL] == 32'b1011, "status bits");
    read_all();
    check(r[REG_RES_FCW] == 42 && r[REG_RES_PHASE] == 17, "result fcw/phase");
    read_all();
    check(r[REG_RES_THETA] == 32'h0000_BEEF, "result theta");
    read_all();
    check(r[REG_RES_AMP_LO] == 32'hFFFF_FFFB, "amplitude low word");
    read_all();
    check(r[REG_RES_AMP_HI] == 32'hFFFF_FFFF, "amplitude high word sign");
    result_amp = 33'h1_2345_6789;
    read_all();
    check(r[REG_RES_AMP_LO] == 32'h2345_6789, "amplitude low word");
    read_all();
    check(r[REG_RES_AMP_HI] == 32'hFFFF_FFFF, "amplitude bit 32 is the sign");
    result_amp = 33'h0_8000_0001;
    read_all();
    check(r[REG_RES_AMP_HI] == 32'h0, "positive amplitude high word");
    busy = 0; result_valid = 0; sweep_done = 1; result_timeout = 0;
    read_all();
    check(r[REG_CTRL] == 32'b0100, "done status");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
