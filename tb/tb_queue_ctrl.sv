// tb_queue_ctrl: random trigger requests and releases against a reference
// FIFO model kept in the testbench. Checks which channels are granted, which
// slot each grant gets, the head slot, the count and the EMPTY/FULL flags,
// and that requests are refused while the queue is full.
module tb_queue_ctrl;
  import plas_pkg::*;
  logic clk = 0, rst_n = 0, rel = 0;
  logic [N_CH-1:0] req = '0, grant;
  logic [N_SLOT-1:0] sstart, srel;
  logic [4:0] sch [N_SLOT];
  logic [2:0] head;
  logic empty, full;
  logic [3:0] count;
  int checks = 0, failures = 0, refused = 0, full_seen = 0;
  int m_wr = 0, m_rd = 0, m_cnt = 0;

  queue_ctrl dut (.clk, .rst_n, .req, .release_i(rel), .grant, .slot_start(sstart), .slot_ch(sch),
    .slot_release(srel), .head, .empty, .full, .count);

  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int ng;
      logic [N_CH-1:0] eg;
      logic [N_SLOT-1:0] es;
      @(negedge clk);
      req = '0;
      if ($urandom_range(0, 3) == 0) begin
        for (int j = 0; j < $urandom_range(1, 4); j++) req[$urandom_range(0, N_CH - 1)] = 1'b1;
      end
      rel = ($urandom_range(0, 2) == 0);
      #1;
      // reference grant
      eg = '0; es = '0; ng = 0;
      for (int c = 0; c < N_CH; c++) if (req[c]) begin
        if (m_cnt + ng < N_SLOT) begin
          eg[c] = 1; es[(m_wr + ng) % N_SLOT] = 1;
          chk(sch[(m_wr + ng) % N_SLOT] == 5'(c), "slot channel");
          ng++;
        end else refused++;
      end
      chk(grant == eg, $sformatf("grant %h exp %h", grant, eg));
      chk(sstart == es, "slot start");
      chk(head == 3'(m_rd), "head");
      chk(count == 4'(m_cnt) && empty == (m_cnt == 0) && full == (m_cnt == N_SLOT), "count/flags");
      if (m_cnt == N_SLOT) full_seen++;
      chk(srel == ((rel && m_cnt > 0) ? N_SLOT'(1) << m_rd : '0), "release slot");
      m_wr = (m_wr + ng) % N_SLOT;
      if (rel && m_cnt > 0) begin m_rd = (m_rd + 1) % N_SLOT; m_cnt--; end
      m_cnt += ng;
    end
    chk(full_seen > 0 && refused > 0, "queue full and refusal exercised");
    $display("full %0d refused %0d", full_seen, refused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
