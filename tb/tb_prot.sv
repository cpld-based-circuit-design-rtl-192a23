// tb_prot: self-checking testbench for prot.
//
// For each phase, a feedback that disagrees with its command for
// TIMEOUT consecutive cycles while the outputs are driven must latch an
// open-circuit fault on exactly that cycle, and only for that phase; shorter
// disagreements, or any disagreement while the outputs are not driven, must
// not. A reference counter in the testbench predicts every cycle.
`timescale 1ns/1ps
module tb_prot;
  import dtc_pkg::*;

  localparam int NPH = 3;
  localparam int TIMEOUT = 50;

  logic clk = 0, rst_n = 0, drive = 0;
  logic [NPH-1:0] cmd = '0, tfb = '0;
  logic [NPH-1:0] open_fault;
  logic fault;

  int checks = 0, failures = 0;

  prot #(.NPH(NPH), .TIMEOUT(TIMEOUT)) dut (.*);

  always #12.5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // reference model
  int ref_cnt[NPH];
  logic [NPH-1:0] ref_fault;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_fault <= '0;
      foreach (ref_cnt[p]) ref_cnt[p] <= 0;
    end else begin
      foreach (ref_cnt[p]) begin
        if (!drive || cmd[p] == tfb[p]) ref_cnt[p] <= 0;
        else begin
          ref_cnt[p] <= ref_cnt[p] + 1;
          if (ref_cnt[p] + 1 >= TIMEOUT) ref_fault[p] <= 1'b1;
        end
      end
    end
  end

  logic [NPH-1:0] seen_fault = '0;
  always @(negedge clk) if (rst_n) begin
    check(open_fault == ref_fault,
          $sformatf("open_fault %b, expected %b", open_fault, ref_fault));
    check(fault == |ref_fault, "fault");
    seen_fault |= open_fault;
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // random activity with short disagreements, outputs driven
    drive = 1;
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk); #1;
      cmd = NPH'($urandom);
      // feedback agrees most of the time, disagreement shorter than TIMEOUT
      tfb = (i % 40 < 30) ? cmd : ~cmd;
    end
    tfb = cmd;
    check(open_fault == '0, "fault on short disagreements");
    // long disagreement while not driven: no fault
    drive = 0;
    tfb = ~cmd;
    repeat (3 * TIMEOUT) @(posedge clk); #1;
    tfb = cmd;
    check(open_fault == '0, "fault while not driven");
    // open phase 1 only
    drive = 1;
    tfb[1] = ~cmd[1];
    repeat (TIMEOUT + 5) @(posedge clk); #1;
    check(open_fault == 3'b010, "phase 1 fault not latched alone");
    tfb = cmd;
    repeat (20) @(posedge clk); #1;
    check(open_fault == 3'b010, "fault not held");
    // reset clears
    rst_n = 0; #1;
    check(open_fault == '0, "reset does not clear");
    @(posedge clk); #1 rst_n = 1;
    tfb[2] = ~cmd[2];
    repeat (TIMEOUT + 5) @(posedge clk); #1;
    check(seen_fault == 3'b110, "phase 2 fault");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
