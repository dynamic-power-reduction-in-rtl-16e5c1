// Workload testbench: every register length and group size of the evaluated
// configurations, run side by side from one clock.
//   lengths 4, 8, 16, 32, 64 with a single gated clock (K = N)
//   8 bits K = 4; 16 bits K = 4, 8; 32 bits K = 4, 8, 16;
//   64 bits K = 4, 8, 16, 32
// Each configuration is an lfsr_lacg_check instance. The run is long enough
// for the 16-bit register to go through its full 65535-state sequence; en is
// low in about one cycle in 32.
module tb_lfsr_lacg_sizes;

  localparam int NumCfg = 15;
  localparam int Cycles = 70000;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic en = 1'b0;
  logic done = 1'b0;

  int c [NumCfg];
  int f [NumCfg];

  always #5 clk = ~clk;

  lfsr_lacg_check #(.N(4),  .K(4))  u0  (.clk, .rst_n, .en, .done, .checks(c[0]),  .failures(f[0]));
  lfsr_lacg_check #(.N(8),  .K(8))  u1  (.clk, .rst_n, .en, .done, .checks(c[1]),  .failures(f[1]));
  lfsr_lacg_check #(.N(8),  .K(4))  u2  (.clk, .rst_n, .en, .done, .checks(c[2]),  .failures(f[2]));
  lfsr_lacg_check #(.N(16), .K(16)) u3  (.clk, .rst_n, .en, .done, .checks(c[3]),  .failures(f[3]));
  lfsr_lacg_check #(.N(16), .K(8))  u4  (.clk, .rst_n, .en, .done, .checks(c[4]),  .failures(f[4]));
  lfsr_lacg_check #(.N(16), .K(4))  u5  (.clk, .rst_n, .en, .done, .checks(c[5]),  .failures(f[5]));
  lfsr_lacg_check #(.N(32), .K(32)) u6  (.clk, .rst_n, .en, .done, .checks(c[6]),  .failures(f[6]));
  lfsr_lacg_check #(.N(32), .K(16)) u7  (.clk, .rst_n, .en, .done, .checks(c[7]),  .failures(f[7]));
  lfsr_lacg_check #(.N(32), .K(8))  u8  (.clk, .rst_n, .en, .done, .checks(c[8]),  .failures(f[8]));
  lfsr_lacg_check #(.N(32), .K(4))  u9  (.clk, .rst_n, .en, .done, .checks(c[9]),  .failures(f[9]));
  lfsr_lacg_check #(.N(64), .K(64)) u10 (.clk, .rst_n, .en, .done, .checks(c[10]), .failures(f[10]));
  lfsr_lacg_check #(.N(64), .K(32)) u11 (.clk, .rst_n, .en, .done, .checks(c[11]), .failures(f[11]));
  lfsr_lacg_check #(.N(64), .K(16)) u12 (.clk, .rst_n, .en, .done, .checks(c[12]), .failures(f[12]));
  lfsr_lacg_check #(.N(64), .K(8))  u13 (.clk, .rst_n, .en, .done, .checks(c[13]), .failures(f[13]));
  lfsr_lacg_check #(.N(64), .K(4))  u14 (.clk, .rst_n, .en, .done, .checks(c[14]), .failures(f[14]));

  initial begin
    #(10 * (Cycles + 100) * 1ns);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c.sum(), f.sum() + 1);
    $finish;
  end

  initial begin
    #1 rst_n = 1'b0;
    repeat (2) @(negedge clk);
    #1 rst_n = 1'b1;
    repeat (Cycles) begin
      @(negedge clk);
      #1 en = (($urandom % 32) != 0);
    end
    @(negedge clk);
    en = 1'b0;
    done = 1'b1;
    #1;
    $display("TB_RESULT checks=%0d failures=%0d", c.sum(), f.sum());
    $finish;
  end

endmodule
