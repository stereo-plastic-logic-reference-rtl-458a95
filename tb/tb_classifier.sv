// tb_classifier: self-checking test of the event classifier.
// Table EEPROMs and bins RAMs are modelled as asynchronous-read arrays.
// Two reference events with known table contents are classified into bank A
// and bank B, then a non-SSD WAP event; the test checks every EEPROM address
// presented, every bin counter, every stored PHA byte, the 139-clock busy
// time per event, and that the PHA-slot counter parks on the scratch slot
// when a region is full.
`timescale 1ns/1ps
module tb_classifier;
  import plastic_pkg::*;

  logic clk = 0, ser_clk = 0, n_rst = 0;
  logic ser_gat = 0, ram_sel = 0;
  logic [5:0] ser_dat = '0;
  logic busy, ee_oe_n, ram_oe_n, ram_we_n, tab_tri, dat2_w, bins_tri, spare;
  logic [16:0] ee_addr;
  logic [3:0]  ee_cs_n;
  logic [7:0]  ee_rdata, ram_wdata, ram_rdata;
  logic [14:0] ram_addr;
  logic [1:0]  ram_cs_n;
  int checks = 0, failures = 0;

  always #20 clk = ~clk;        // 25 MHz stand-in for 25.6 MHz
  always #40 ser_clk = ~ser_clk; // half of clk, unrelated phase

  classifier dut (.*);

  // ---- memory models ----
  logic [7:0] ee [4][int];
  logic [7:0] ram [2][32768];
  int ee_seen [int];
  always_comb begin
    ee_rdata = 8'hFF;
    for (int c = 0; c < 4; c++)
      if (!ee_cs_n[c] && !ee_oe_n) ee_rdata = ee[c].exists(int'(ee_addr)) ? ee[c][int'(ee_addr)] : 8'h00;
  end
  always_comb begin
    ram_rdata = 8'h00;
    if (!ram_cs_n[0] && !ram_oe_n) ram_rdata = ram[0][ram_addr];
    if (!ram_cs_n[1] && !ram_oe_n) ram_rdata = ram[1][ram_addr];
  end
  always_ff @(posedge clk) begin
    if (!ram_we_n && !ram_cs_n[0]) ram[0][ram_addr] <= ram_wdata;
    if (!ram_we_n && !ram_cs_n[1]) ram[1][ram_addr] <= ram_wdata;
    for (int c = 0; c < 4; c++)
      if (!ee_cs_n[c] && !ee_oe_n) ee_seen[c * 32'h20000 + int'(ee_addr)] = 1;
  end

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [15:0] rd16(input int b, input int a);
    return {ram[b][a + 1], ram[b][a]};
  endfunction

  int busy_len;
  realtime t_rise;
  task automatic send(input logic [47:0] w);
    for (int b = 7; b >= 0; b--) begin
      @(posedge ser_clk);
      ser_gat <= 1'b1;
      for (int l = 0; l < 6; l++) ser_dat[l] <= w[8*l + b];
    end
    @(posedge ser_clk);
    ser_gat <= 1'b0;
    ser_dat <= '0;
    @(posedge busy);
    t_rise = $realtime;
    @(negedge busy);
    busy_len = int'(($realtime - t_rise) / 40.0);
  endtask

  task automatic check_pha(input int b, input int base, input logic [47:0] w);
    for (int k = 0; k < 6; k++) check($sformatf("pha byte %0h", base + k), ram[b][base + k], w[8*k +: 8]);
  endtask

  // watchdog
  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [47:0] w3;
    pha_word_t p;
    for (int b = 0; b < 2; b++) for (int a = 0; a < 32768; a++) ram[b][a] = 8'h00;
    // Reference event tables
    ee[0][32'h0B9B4] = 8'h36; ee[2][32'h05CAB] = 8'hA2;
    ee[3][32'h06D44] = 8'hBF; ee[3][32'h06D45] = 8'h57;
    ee[0][32'h14801] = 8'h36; ee[2][32'h0A42B] = 8'hA2;
    // WAP event tables (worked by hand from the address rules)
    ee[0][32'h00F00] = 8'h85;  // msb must be ignored: Nm = 05
    ee[2][32'h00781] = 8'h10;
    ee[3][32'h10A20] = 8'h7F; ee[3][32'h10A21] = 8'h58;

    repeat (3) @(posedge clk);
    n_rst = 1;
    check("busy after reset", busy, 1);
    wait (!busy);

    // Event 1 -> bank A
    send(48'h57C01522E534);
    check("busy length ev1", busy_len, 139);
    check("ee mass ev1", ee_seen.exists(0 * 32'h20000 + 32'h0B9B4), 1);
    check("ee mq ev1",   ee_seen.exists(2 * 32'h20000 + 32'h05CAB), 1);
    check("ee bins lo",  ee_seen.exists(3 * 32'h20000 + 32'h06D44), 1);
    check("ee bins hi",  ee_seen.exists(3 * 32'h20000 + 32'h06D45), 1);
    check("cnt 271E", rd16(0, 'h271E), 1);
    check("cnt 2F78", rd16(0, 'h2F78), 1);
    check("cnt 30FE", rd16(0, 'h30FE), 4);
    check_pha(0, 'h4800, 48'h57C01522E535);
    check("bank B untouched", rd16(1, 'h271E), 0);

    // Event 2 -> bank B (fresh PHA slots)
    ram_sel = 1;
    repeat (6) @(posedge clk);
    send(48'h5757C01522E5);
    check("busy length ev2", busy_len, 139);
    check("ee mass ev2", ee_seen.exists(0 * 32'h20000 + 32'h14801), 1);
    check("ee mq ev2",   ee_seen.exists(2 * 32'h20000 + 32'h0A42B), 1);
    check("cnt 27FA", rd16(1, 'h27FA), 1);
    check("cnt 2F6A", rd16(1, 'h2F6A), 1);
    check("cnt 30FE B", rd16(1, 'h30FE), 4);
    check_pha(1, 'h4800, 48'h5757C01522E5);
    check("bank A 30FE unchanged", rd16(0, 'h30FE), 4);

    // Event 3: WAP without SSDs, quadrant 3, position 40
    p = '0; p.swpe = 7'd1; p.quadrant = 2'b11; p.tof = 10'd15; p.position = 6'd40;
    p.section = SEC_WAP;
    w3 = p;
    send(w3);
    check("ee bins wap", ee_seen.exists(3 * 32'h20000 + 32'h10A20), 1);
    check("cnt supra noE 317A", rd16(1, 'h317A), 1);
    check("cnt wap rate 3202", rd16(1, 'h3202), 1);
    check("cnt 30FE B after wap", rd16(1, 'h30FE), 8);
    p.spare = 2'b01;
    check_pha(1, 'h6800, p);

    // Fill wap1 (32 words): 31 more events, then one more must go to scratch 0x6FF8
    for (int n = 1; n < 32; n++) send(w3);
    check("wap1 last slot", ram[1]['h6800 + 31 * 8], 8'(p));
    p.tof = 10'd15; p.swpe = 7'd1;
    ram[1]['h6FF8] = 8'h00;
    send(w3);
    check("wap1 overflow to scratch", ram[1]['h6FF8], 8'(p));
    check("cnt wap rate 3202 x33", rd16(1, 'h3202), 33);
    check("spare pin follows word bit 0", spare, w3[0]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
