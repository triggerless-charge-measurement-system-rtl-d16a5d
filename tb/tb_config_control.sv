// tb_config_control: self-checking test of the configuration registers.
// Writes random values to every register in random order and compares the
// outputs with a register model after each write; checks that start and stop
// are one-clock pulses, that an unmapped address changes nothing, and the
// reset values.
module tb_config_control;
  import daq_pkg::*;

  logic clk = 0, rst_n = 0, cfg_wr = 0;
  logic [3:0] cfg_addr = '0;
  logic [WORD_W-1:0] cfg_data = '0;
  logic start, stop, test_mode;
  logic [N_CH-1:0] ch_mask;
  logic [THR_W-1:0] threshold;
  always #5 clk = ~clk;

  config_control dut (.clk, .rst_n, .cfg_wr, .cfg_addr, .cfg_data, .start, .stop,
                      .ch_mask, .threshold, .test_mode);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  logic [N_CH-1:0] m_mask = '0;
  logic [THR_W-1:0] m_thr = '0;
  logic m_test = 0;
  int n_start = 0, n_stop = 0, m_start = 0, m_stop = 0;
  always @(posedge clk) if (rst_n) begin
    if (start) n_start++;
    if (stop) n_stop++;
  end

  task automatic wr(logic [3:0] a, logic [WORD_W-1:0] d);
    @(posedge clk); cfg_wr <= 1; cfg_addr <= a; cfg_data <= d;
    @(posedge clk); cfg_wr <= 0;
    case (a)
      4'd0: begin m_start += d[0]; m_stop += d[1]; end
      4'd1: m_mask = d[7:0];
      4'd2: m_thr = d[7:0];
      4'd3: m_test = d[0];
      default: ;
    endcase
    @(posedge clk); #1;
    check(ch_mask == m_mask && threshold == m_thr && test_mode == m_test,
          $sformatf("registers after write %0d<=%0h", a, d));
    check(!start && !stop, "commands are single pulses");
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    check(ch_mask == 0 && threshold == 0 && !test_mode && !start && !stop, "reset values");
    rst_n <= 1;
    wr(4'd2, 10'd4);
    for (int i = 0; i < 300; i++) wr(4'($urandom_range(0, 5)), 10'($urandom));
    check(n_start == m_start && n_stop == m_stop,
          $sformatf("start %0d/%0d stop %0d/%0d", n_start, m_start, n_stop, m_stop));
    check(n_start > 10, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
