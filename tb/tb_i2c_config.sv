// tb_i2c_config: an I2C master in the testbench writes a channel's
// configuration and two group references with one auto-incrementing burst,
// reads them back with a repeated-start read, checks the decoded ch_cfg and
// vref outputs, and checks that another address is not acknowledged.
module tb_i2c_config;
  import plas_pkg::*;
  logic clk = 0, rst_n = 0, scl = 1, m_low = 0, s_oe;
  wire  sda = !(m_low || s_oe);
  ch_cfg_t cfg [N_CH];
  logic [7:0] vref [N_GROUP][2];
  int checks = 0, failures = 0;
  localparam int HP = 10;   // clock ticks per SCL half period

  i2c_config dut (.clk, .rst_n, .scl, .sda_i(sda), .sda_oe(s_oe), .ch_cfg(cfg), .vref);

  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic wt(input int n); repeat (n) @(negedge clk); endtask
  task automatic i2c_start(); m_low = 0; scl = 1; wt(HP); m_low = 1; wt(HP); scl = 0; wt(HP); endtask
  task automatic i2c_stop();  m_low = 1; wt(HP); scl = 1; wt(HP); m_low = 0; wt(HP); endtask
  task automatic wr_byte(input logic [7:0] b, output logic ack);
    for (int i = 7; i >= 0; i--) begin m_low = !b[i]; wt(HP); scl = 1; wt(HP); scl = 0; end
    m_low = 0; wt(HP); scl = 1; wt(HP / 2); ack = !sda; wt(HP / 2); scl = 0;
  endtask
  task automatic rd_byte(input bit last, output logic [7:0] b);
    m_low = 0;
    for (int i = 7; i >= 0; i--) begin wt(HP); scl = 1; wt(HP / 2); b[i] = sda; wt(HP / 2); scl = 0; end
    m_low = !last; wt(HP); scl = 1; wt(HP); scl = 0; wt(2); m_low = 0;
  endtask

  initial begin
    logic ack;
    logic [7:0] rb;
    logic [7:0] wdat [4] = '{8'h2D, 8'h09, 8'hA5, 8'h3C};
    wt(3); rst_n = 1; wt(5);
    // burst write to channel 6 (registers 24..27)
    i2c_start();
    wr_byte({7'h2A, 1'b0}, ack); chk(ack, "address ack");
    wr_byte(8'd24, ack);         chk(ack, "pointer ack");
    foreach (wdat[i]) begin wr_byte(wdat[i], ack); chk(ack, "data ack"); end
    i2c_stop();
    // group 2 references (registers 128+4, 128+5)
    i2c_start();
    wr_byte({7'h2A, 1'b0}, ack); wr_byte(8'd132, ack); wr_byte(8'd100, ack); wr_byte(8'd150, ack);
    i2c_stop();
    wt(5);
    chk(cfg[6].pol == 1 && cfg[6].test_sel == 0 && cfg[6].vref_sel == 1 && cfg[6].en_ext == 1 &&
        cfg[6].en_hyst == 0 && cfg[6].en_lead == 1, "mode bits");
    chk(cfg[6].gmask == 4'h9 && cfg[6].thr_hi == 8'hA5 && cfg[6].thr_lo == 8'h3C, "mask and thresholds");
    chk(cfg[5] == '0 && cfg[7] == '0, "neighbours untouched");
    chk(vref[2][0] == 8'd100 && vref[2][1] == 8'd150 && vref[1][1] == 8'd0, "references");
    // read back with a repeated start
    i2c_start();
    wr_byte({7'h2A, 1'b0}, ack); wr_byte(8'd24, ack);
    m_low = 0; scl = 0; wt(HP); scl = 1; wt(HP); m_low = 1; wt(HP); scl = 0; wt(HP);  // Sr
    wr_byte({7'h2A, 1'b1}, ack); chk(ack, "read address ack");
    for (int i = 0; i < 4; i++) begin
      rd_byte(i == 3, rb);
      chk(rb == wdat[i], $sformatf("read back %0d: %h exp %h", i, rb, wdat[i]));
    end
    i2c_stop();
    // wrong address: no ack, no write
    i2c_start();
    wr_byte({7'h2B, 1'b0}, ack); chk(!ack, "foreign address not acked");
    wr_byte(8'd0, ack); wr_byte(8'hFF, ack);
    i2c_stop();
    wt(5);
    chk(cfg[0] == '0, "foreign write ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
