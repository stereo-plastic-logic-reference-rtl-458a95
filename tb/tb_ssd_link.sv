// tb_ssd_link: self-checking testbench of ssd_link against the ssd_model
// board model, with the two data lines delayed by different amounts.
// Checks the command shift (word, 16 clocks, clock period, strobe rising
// with the leading edge of the last bit and lasting 1.5 periods, idle-low
// lines), energy reads (word, ten clock pulses, no strobe, cmd_in low,
// latency of 11 periods), housekeeping reads, a queued read and command
// (read first), the error flag for a dead line, and the m_reset/sync pulse
// widths. Random words throughout.
module tb_ssd_link;
  localparam int DIV = 8;
  logic clk = 0, rst_n = 0;
  always #20 clk = ~clk;

  logic [3:0]  ctrl = '0;
  logic [15:0] cmd = '0, word = '0;
  logic        rd_req = 0, kill1 = 0;
  logic        rd_done, hk_valid, rd_err, busy, cmd_clk, cmd_in, cmd_strobe, m_reset, sync;
  logic [15:0] rd_word, hk_word, last_cmd;
  logic        dat0, dat1, m_dat1;
  int          n_cmd, n_reset;

  ssd_link dut (.clk, .rst_n, .ctrl, .cmd, .rd_req, .rd_done, .rd_word, .hk_valid, .hk_word,
                .rd_err, .busy, .cmd_clk, .cmd_in, .cmd_strobe, .dat0, .dat1(dat1), .m_reset, .sync);
  ssd_model #(.SKEW0_NS(0), .SKEW1_NS(60)) board (.cmd_clk, .cmd_in, .cmd_strobe, .m_reset, .word,
                .dat0, .dat1(m_dat1), .n_cmd, .n_reset, .last_cmd);
  assign dat1 = kill1 ? 1'b0 : m_dat1;

  int checks = 0, failures = 0;
  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0h exp %0h", what, got, exp); end
  endtask

  // independent observation of the lines, in clk cycles
  int cyc = 0;
  always @(posedge clk) cyc++;
  int n_rise, n_fall, t_fall[$], t_rise[$], t_str_r, t_str_f, n_str_r;
  logic pc = 0, ps = 0;
  always @(posedge clk) if (rst_n) begin
    if (cmd_clk && !pc) begin n_rise++; t_rise.push_back(cyc); end
    if (!cmd_clk && pc) begin n_fall++; t_fall.push_back(cyc); end
    if (cmd_strobe && !ps) begin n_str_r++; t_str_r = cyc; end
    if (!cmd_strobe && ps) t_str_f = cyc;
    pc <= cmd_clk; ps <= cmd_strobe;
  end
  int cmd_in_high_in_read;

  task automatic clr();
    n_rise = 0; n_fall = 0; t_fall.delete(); t_rise.delete(); n_str_r = 0;
  endtask

  task automatic send_cmd(input logic [15:0] c);
    int n0 = n_cmd;
    cmd = c; clr();
    @(posedge clk) ctrl[1] <= 1'b1;
    @(posedge clk) ctrl[1] <= 1'b0;
    wait (n_cmd == n0 + 1);
    repeat (4) @(posedge clk);
    check("cmd word", last_cmd, c);
    check("cmd rising edges", n_rise, 16);
    check("cmd period", t_rise[15] - t_rise[14], DIV);
    // bit 0 leads at the 15th falling edge; strobe rises there
    check("strobe at last bit", t_str_r, t_fall[14]);
    check("strobe width 1.5 periods", t_str_f - t_str_r, 3 * DIV / 2);
    check("lines idle low", {cmd_clk, cmd_in, cmd_strobe}, 3'b000);
  endtask

  task automatic read(input logic is_hk, input logic [15:0] w, input logic exp_err);
    int t0;
    word = w; clr(); cmd_in_high_in_read = 0;
    @(posedge clk);
    if (is_hk) ctrl[0] <= 1'b1; else rd_req <= 1'b1;
    t0 = cyc;
    @(posedge clk) begin rd_req <= 1'b0; ctrl[0] <= 1'b0; end
    while (!(is_hk ? hk_valid : rd_done)) begin
      @(posedge clk); if (cmd_in) cmd_in_high_in_read++;
    end
    check("read word", is_hk ? hk_word : rd_word, exp_err ? (is_hk ? hk_word : rd_word) : w);
    check("read err", rd_err, exp_err);
    check("read pulses", n_rise, 10);
    check("read no strobe", n_str_r, 0);
    check("read cmd_in low", cmd_in_high_in_read, 0);
    check("read latency", cyc - t0, 11 * DIV + 3);
  endtask

  initial begin
    #2000000; failures++;
    $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1; repeat (3) @(posedge clk);
    check("idle lines", {cmd_clk, cmd_in, cmd_strobe, m_reset, sync}, 5'b0);
    send_cmd(16'hA5C3);
    send_cmd(16'h8001);
    for (int i = 0; i < 8; i++) send_cmd(16'($urandom));
    read(0, 16'h8142, 0);
    for (int i = 0; i < 10; i++) read(i[0], 16'($urandom), 0);
    // read and command requested together: the read goes first
    begin
      int nc;
      nc = n_cmd;
      word = 16'h3C5A; cmd = 16'h1234;
      @(posedge clk) begin rd_req <= 1'b1; ctrl[1] <= 1'b1; end
      @(posedge clk) begin rd_req <= 1'b0; ctrl[1] <= 1'b0; end
      wait (rd_done);
      check("queued read word", rd_word, 16'h3C5A);
      check("command waits for read", n_cmd, nc);
      wait (n_cmd == nc + 1);
      check("queued command", last_cmd, 16'h1234);
    end
    // a dead data line
    kill1 = 1; read(0, 16'hFFFF, 1); kill1 = 0;
    read(0, 16'h0F0F, 0);
    // reset and sync pulses
    begin
      int t0, n;
      n = n_reset;
      @(posedge clk) ctrl[3] <= 1'b1;
      @(posedge clk); wait (m_reset); t0 = cyc;
      wait (!m_reset);
      check("m_reset width", cyc - t0, 26);
      check("board saw reset", n_reset, n + 1);
      ctrl[3] <= 1'b0;
      @(posedge clk) ctrl[2] <= 1'b1;
      wait (sync); t0 = cyc; wait (!sync);
      check("sync width", cyc - t0, 26);
      check("level does not retrigger", m_reset, 0);
    end
    repeat (40) @(posedge clk);
    check("no sync repeat", sync, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
