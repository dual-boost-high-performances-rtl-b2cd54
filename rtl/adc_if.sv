// adc_if - handshake with one 10-bit AD1061-type A/D converter.
//
// A conversion is started by pulling WR low for WR_CYCLES clocks. The
// converter signals the end of the conversion by pulling INT low; the
// interface then pulls RD low, waits SETTLE_CYCLES clocks for the data bus
// (the paper allows 50 ns: 3 clocks at the 50 MHz assumed here), latches
// it, releases RD and pulses valid. This follows the paper's handshake
// (data read while WR and INT are low, RD driven from that condition); the
// WR pulse width and the timeout are this design's choices. If INT does not
// come within TIMEOUT_CYCLES clocks of the start, timeout pulses and no data
// is latched. All converter signals are active low; ad_int_n and ad_data are
// sampled through one register stage.
//
// Timing: a start while busy is ignored; a 2 us conversion takes about 115
// clocks from start to valid at 50 MHz.
module adc_if #(
  parameter int unsigned DW             = 10,
  parameter int unsigned WR_CYCLES      = 5,
  parameter int unsigned SETTLE_CYCLES  = 3,
  parameter int unsigned TIMEOUT_CYCLES = 200
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          ad_wr_n,
  input  logic          ad_int_n,
  output logic          ad_rd_n,
  input  logic [DW-1:0] ad_data,
  output logic [DW-1:0] data,
  output logic          valid,
  output logic          timeout,
  output logic          busy
);

  typedef enum logic [1:0] {S_IDLE, S_WR, S_WAIT, S_RD} state_e;

  state_e        state;
  logic [15:0]   cnt;
  logic          int_q;
  logic [DW-1:0] data_q;

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      cnt     <= '0;
      ad_wr_n <= 1'b1;
      ad_rd_n <= 1'b1;
      data    <= '0;
      valid   <= 1'b0;
      timeout <= 1'b0;
      int_q   <= 1'b1;
      data_q  <= '0;
    end else begin
      int_q   <= ad_int_n;
      data_q  <= ad_data;
      valid   <= 1'b0;
      timeout <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          ad_wr_n <= 1'b0;
          cnt     <= 16'(WR_CYCLES - 1);
          state   <= S_WR;
        end
        S_WR: begin
          if (cnt == '0) begin
            ad_wr_n <= 1'b1;
            cnt     <= 16'(TIMEOUT_CYCLES);
            state   <= S_WAIT;
          end else cnt <= cnt - 16'd1;
        end
        S_WAIT: begin
          if (!int_q) begin
            ad_rd_n <= 1'b0;
            cnt     <= 16'(SETTLE_CYCLES);
            state   <= S_RD;
          end else if (cnt == '0) begin
            timeout <= 1'b1;
            state   <= S_IDLE;
          end else cnt <= cnt - 16'd1;
        end
        S_RD: begin
          if (cnt == '0) begin
            data    <= data_q;
            valid   <= 1'b1;
            ad_rd_n <= 1'b1;
            state   <= S_IDLE;
          end else cnt <= cnt - 16'd1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
