// ferro_datapath_tb: drives one lane's data path directly. It loads each
// control byte through the multiplexer and checks that SDA carries it most
// significant bit first, that SCL is pulled low only in the low half while
// enabled, that the START/STOP flip-flop reaches SDA only when enabled, that
// serial data from SDA is assembled into the read byte, and that the
// data-bus enable follows the controller.
module ferro_datapath_tb;
  import ferro_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic phase_high = 1'b1, ss_q = 1'b1, sda_in = 1'b1;
  dp_ctrl_t dp;
  lane_ctrl_t lc;
  logic [1:0] chip;
  logic page;
  logic [7:0] word, wdata, rdata, exp;
  logic scl_n, sda_n, rd_oe;
  int checks = 0, failures = 0;

  always #100 clk = ~clk;

  ferro_datapath dut (.clk(clk), .rst_n(rst_n), .phase_high(phase_high), .dp_ctrl(dp), .lc(lc),
                      .ss_q(ss_q), .chip(chip), .page(page), .word(word), .wdata(wdata),
                      .sda_in(sda_in), .scl_n(scl_n), .sda_n(sda_n), .rdata(rdata), .rd_oe(rd_oe));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic strobe();
    @(negedge clk); lc.sr_ce = 1'b1;
    @(negedge clk); lc.sr_ce = 1'b0;
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lc = '0; dp = '{mode: SR_HOLD, sel: BYTE_SLAVE_WR};
    chip = 0; page = 0; word = 0; wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 40; t++) begin
      byte_sel_t s;
      s = byte_sel_t'(t % 4);
      chip = 2'($urandom); page = 1'($urandom); word = 8'($urandom); wdata = 8'($urandom);
      case (s)
        BYTE_SLAVE_WR: exp = {4'b1010, chip, page, 1'b0};
        BYTE_WORD:     exp = word;
        BYTE_DATA:     exp = wdata;
        default:       exp = {4'b1010, chip, page, 1'b1};
      endcase
      dp = '{mode: SR_LOAD, sel: s};
      strobe();
      lc.sr_bus_en = 1'b1;
      dp.mode = SR_SHR;
      for (int b = 7; b >= 0; b--) begin
        #1;
        check(sda_n == !exp[b], $sformatf("byte %0d bit %0d on SDA", s, b));
        strobe();
      end
      lc.sr_bus_en = 1'b0;
      #1;
      check(sda_n == 1'b0, "SDA released with drivers off");
    end

    // START/STOP flip-flop onto SDA
    lc.ss_en = 1'b1; ss_q = 1'b0; #1;
    check(sda_n == 1'b1, "flip-flop low pulls SDA");
    ss_q = 1'b1; #1;
    check(sda_n == 1'b0, "flip-flop high releases SDA");
    lc.ss_en = 1'b0; ss_q = 1'b0; #1;
    check(sda_n == 1'b0, "flip-flop not enabled");

    // SCL
    lc.scl_en = 1'b1; phase_high = 1'b1; #1; check(scl_n == 1'b0, "SCL high half");
    phase_high = 1'b0; #1; check(scl_n == 1'b1, "SCL low half");
    lc.scl_en = 1'b0; #1; check(scl_n == 1'b0, "SCL disabled floats high");

    // receive bytes
    for (int t = 0; t < 20; t++) begin
      logic [7:0] v;
      v = 8'($urandom);
      dp.mode = SR_SHR; lc.sr_in_en = 1'b1;
      for (int b = 7; b >= 0; b--) begin
        sda_in = v[b];
        strobe();
        #1; check(sda_n == 1'b0, "lane does not drive SDA while receiving");
      end
      lc.sr_in_en = 1'b0; sda_in = 1'b0;
      strobe();   // serial input ignored when not enabled: shifts in a released (1) bit
      check(rdata == {v[6:0], 1'b1}, "serial input sees a released line when disabled");
      lc.sr_in_en = 1'b1;
      for (int b = 7; b >= 0; b--) begin sda_in = v[b]; strobe(); end
      lc.sr_in_en = 1'b0;
      dp.mode = SR_HOLD; strobe();
      lc.rd_oe = 1'b1; #1;
      check(rdata == v && rd_oe, $sformatf("received %h expected %h", rdata, v));
      lc.rd_oe = 1'b0; #1;
      check(!rd_oe, "data-bus enable off");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
