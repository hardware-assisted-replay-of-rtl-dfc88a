// tb_workloads: the full-size record and replay system under traffic at or
// above the rates of the four measured workloads, each recorded in both
// logging modes and replayed. The required floors are the workloads' bus
// transaction and log record rates per 1000 clocks of a 20 MHz logger
// (16-processor VERIFY with 4- and 16-byte lines, GENIE with 4- and 16-byte
// lines), one above the whole part.
// The four runs share the clock and run side by side.
module tb_workloads;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0] done;
  int         checks [4];
  int         failures [4];

  // VERIFY, 4-byte lines: 1.15M bus transactions/s, 585K log entries/s
  workload_cell #(.SH_PM(12), .PV_PM(6), .NLINES(48), .MIN_BUS_PM(58), .MIN_LOG_PM(30))
    u_verify4 (.clk, .done(done[0]), .checks(checks[0]), .failures(failures[0]));
  // VERIFY, 16-byte lines: 1.6M bus transactions/s, 900K log entries/s
  workload_cell #(.SH_PM(16), .PV_PM(8), .NLINES(48), .MIN_BUS_PM(81), .MIN_LOG_PM(46))
    u_verify16 (.clk, .done(done[1]), .checks(checks[1]), .failures(failures[1]));
  // GENIE, 4-byte lines: 310K bus transactions/s, 171K log entries/s
  workload_cell #(.SH_PM(4), .PV_PM(2), .NLINES(64), .MIN_BUS_PM(16), .MIN_LOG_PM(9))
    u_genie4 (.clk, .done(done[2]), .checks(checks[2]), .failures(failures[2]));
  // GENIE, 16-byte lines: 300K bus transactions/s, 182K log entries/s
  workload_cell #(.SH_PM(4), .PV_PM(2), .NLINES(64), .MIN_BUS_PM(16), .MIN_LOG_PM(10))
    u_genie16 (.clk, .done(done[3]), .checks(checks[3]), .failures(failures[3]));

  initial begin
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d",
             checks[0] + checks[1] + checks[2] + checks[3],
             failures[0] + failures[1] + failures[2] + failures[3]);
    $finish;
  end

  // watchdog
  initial begin
    repeat (8000000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d",
             checks[0] + checks[1] + checks[2] + checks[3],
             failures[0] + failures[1] + failures[2] + failures[3] + 1);
    $finish;
  end

endmodule
