// nm24cf04_model: behavioural model of one NM24CF04 serial ferroelectric
// memory (512 bytes, two 256-byte pages) on an open-drain SCL/SDA bus.
// Testbench use only; not synthesizable.
//
// It watches the resolved SCL and SDA levels on every system clock and
// answers the standard two-wire protocol of the part: START, slave address
// 1010 A2 A1 P R/W, acknowledge, word address, data, STOP. A byte write is
// stored when STOP follows the data byte; a read returns the byte at the
// current address and advances it. Input bits are taken on the SCL rising
// edge; the model changes SDA after the SCL falling edge. CHIP_ADDR is the
// level of the A2 A1 pins. ack_enable = 0 makes the device ignore its
// address, as if it were absent.
//
// The interface stops SCL (holding it high) right after some acknowledge
// clocks and after the last data bit; the model then releases SDA once SCL
// has been high for HOLD_CLKS system clocks, so that the following START or
// STOP can be seen. That release rule is the model's own assumption.
module nm24cf04_model #(
  parameter logic [1:0]  CHIP_ADDR = 2'b00,
  parameter int unsigned HOLD_CLKS = 38
) (
  input  logic clk,
  input  logic scl,        // resolved SCL level
  input  logic sda,        // resolved SDA level
  input  logic ack_enable,
  output logic sda_n       // 1: pull SDA low
);

  typedef enum logic [1:0] {M_IDLE, M_RX, M_TX} mode_t;
  typedef enum logic [1:0] {RX_DEV, RX_WORD, RX_DATA} rx_t;

  logic [7:0]  mem [512];
  logic        scl_q = 1'b1, sda_q = 1'b1;
  mode_t       mode = M_IDLE;
  rx_t         rx_kind = RX_DEV;
  int unsigned bitcnt = 0;
  int unsigned high_cnt = 0;
  logic [7:0]  sh = '0;
  logic        ack_phase = 1'b0;
  logic        after_ack_tx = 1'b0;
  logic        page = 1'b0;
  logic [7:0]  word = '0;
  logic        wr_pending = 1'b0;
  logic [7:0]  wr_data = '0;

  // Counters and last transfer, read by the testbenches.
  int unsigned n_start = 0, n_stop = 0, n_ack = 0, n_writes = 0, n_reads = 0;
  logic [7:0]  last_rx [3];
  int unsigned rx_idx = 0;

  initial begin
    sda_n = 1'b0;
    for (int i = 0; i < 512; i++) mem[i] = 8'(i * 7 + 3) ^ {6'b0, CHIP_ADDR};
    for (int i = 0; i < 3; i++) last_rx[i] = '0;
    sda_n = 1'b0;
  end

  function automatic logic [8:0] ptr();
    return {page, word};
  endfunction

  always @(posedge clk) begin
    high_cnt <= scl ? high_cnt + 1 : 0;

    if (scl && scl_q && sda_q && !sda) begin
      // START
      n_start   <= n_start + 1;
      mode      <= M_RX;
      rx_kind   <= RX_DEV;
      bitcnt    <= 0;
      ack_phase <= 1'b0;
      wr_pending <= 1'b0;
      rx_idx    <= 0;
      sda_n     <= 1'b0;
    end else if (scl && scl_q && !sda_q && sda) begin
      // STOP
      n_stop <= n_stop + 1;
      if (wr_pending && mode != M_IDLE) begin
        mem[ptr()] <= wr_data;
        n_writes   <= n_writes + 1;
        word       <= word + 8'd1;
      end
      wr_pending <= 1'b0;
      mode       <= M_IDLE;
      ack_phase  <= 1'b0;
      sda_n      <= 1'b0;
    end else if (scl && !scl_q) begin
      // SCL rising edge: take a bit
      if (mode == M_RX && !ack_phase) begin
        sh     <= {sh[6:0], sda};
        bitcnt <= bitcnt + 1;
      end else if (mode == M_TX) begin
        if (bitcnt < 8) bitcnt <= bitcnt + 1;
        else if (sda) mode <= M_IDLE;        // no acknowledge from the master
        else begin bitcnt <= 0; word <= word + 8'd1; end
      end
    end else if (!scl && scl_q) begin
      // SCL falling edge: change SDA
      if (ack_phase) begin
        ack_phase <= 1'b0;
        bitcnt    <= 0;
        if (after_ack_tx) begin
          mode  <= M_TX;
          sda_n <= !mem[ptr()][7];
          n_reads <= n_reads + 1;
        end else begin
          mode  <= M_RX;
          sda_n <= 1'b0;
        end
      end else if (mode == M_RX && bitcnt == 8) begin
        if (rx_idx < 3) last_rx[rx_idx] <= sh;
        rx_idx <= rx_idx + 1;
        bitcnt <= 0;
        unique case (rx_kind)
          RX_DEV: begin
            if (sh[7:4] == 4'b1010 && sh[3:2] == CHIP_ADDR && ack_enable) begin
              page         <= sh[1];
              after_ack_tx <= sh[0];
              rx_kind      <= RX_WORD;
              ack_phase    <= 1'b1;
              sda_n        <= 1'b1;
              n_ack        <= n_ack + 1;
            end else begin
              mode <= M_IDLE;
            end
          end
          RX_WORD: begin
            word         <= sh;
            after_ack_tx <= 1'b0;
            rx_kind      <= RX_DATA;
            ack_phase    <= 1'b1;
            sda_n        <= 1'b1;
            n_ack        <= n_ack + 1;
          end
          default: begin
            wr_data      <= sh;
            wr_pending   <= 1'b1;
            after_ack_tx <= 1'b0;
            ack_phase    <= 1'b1;
            sda_n        <= 1'b1;
            n_ack        <= n_ack + 1;
          end
        endcase
      end else if (mode == M_TX) begin
        sda_n <= (bitcnt < 8) ? !mem[ptr()][7 - bitcnt] : 1'b0;
      end
    end else if (sda_n && scl && high_cnt >= HOLD_CLKS) begin
      // SCL stopped high: let go of SDA
      sda_n <= 1'b0;
      if (ack_phase) begin
        ack_phase <= 1'b0;
        bitcnt    <= 0;
        mode      <= after_ack_tx ? M_TX : M_RX;
      end
    end
    scl_q <= scl;
    sda_q <= sda;
  end

endmodule
