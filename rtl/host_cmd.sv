// host_cmd: one-byte command interpreter of the host serial link.
//
// Commands (ASCII):
//   'E' start an enrollment scan        'V' start a verification scan
//   'C' select the core PDN             'I' select the I/O PDN
//   'S' reply with the status byte (iv_pkg::status_t)
//   'W' reply with the WD profile of the last verification: for each of
//       the NUM_FREQ points, the sum of |g - t| (NUM_REP times the
//       Wasserstein distance, milliohm) as 3 bytes, most significant first.
// Start commands become one-clock pulses; the PDN selection is a register
// (ignored while a scan runs). Other bytes, and any byte arriving while a
// reply is being sent, are ignored. A reply byte is handed to the
// transmitter with `tx_start` whenever it is idle; the transmitter's
// `tx_busy` must rise in the clock after `tx_start`.
//
// The host link carrying commands and measurement data is described; the
// command set and encoding are this design's own.
module host_cmd
  import iv_pkg::*;
#(
  parameter int unsigned NUM_FREQ_P = iv_pkg::NUM_FREQ
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [7:0]        rx_data,
  input  logic              rx_valid,
  output logic [7:0]        tx_data,
  output logic              tx_start,
  input  logic              tx_busy,
  input  status_t           status,
  output logic [FIDX_W-1:0] wdp_idx,
  input  logic [WD_W-1:0]   wdp_sum,
  output logic              start_enroll,
  output logic              start_verify,
  output logic              pdn_sel
);

  typedef enum logic [1:0] {T_IDLE, T_STATUS, T_WDUMP, T_GAP} tstate_e;
  tstate_e    tstate, tnext;
  logic [1:0] byte_i;       // byte of the current 3-byte WD word

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tstate       <= T_IDLE;
      tnext        <= T_IDLE;
      byte_i       <= '0;
      wdp_idx      <= '0;
      tx_data      <= '0;
      tx_start     <= 1'b0;
      start_enroll <= 1'b0;
      start_verify <= 1'b0;
      pdn_sel      <= 1'b0;
    end else begin
      tx_start     <= 1'b0;
      start_enroll <= 1'b0;
      start_verify <= 1'b0;
      unique case (tstate)
        T_IDLE: if (rx_valid) begin
          unique case (rx_data)
            CMD_ENROLL: start_enroll <= 1'b1;
            CMD_VERIFY: start_verify <= 1'b1;
            CMD_CORE:   if (!status.busy) pdn_sel <= 1'b0;
            CMD_IO:     if (!status.busy) pdn_sel <= 1'b1;
            CMD_STATUS: tstate <= T_STATUS;
            CMD_WDUMP: begin
              tstate  <= T_WDUMP;
              wdp_idx <= '0;
              byte_i  <= '0;
            end
            default: ;
          endcase
        end
        T_STATUS: if (!tx_busy) begin
          tx_data  <= status;
          tx_start <= 1'b1;
          tnext    <= T_IDLE;
          tstate   <= T_GAP;
        end
        T_WDUMP: if (!tx_busy) begin
          unique case (byte_i)
            2'd0:    tx_data <= wdp_sum[23:16];
            2'd1:    tx_data <= wdp_sum[15:8];
            default: tx_data <= wdp_sum[7:0];
          endcase
          tx_start <= 1'b1;
          tstate   <= T_GAP;
          if (byte_i == 2'd2) begin
            byte_i <= '0;
            if (32'(wdp_idx) == NUM_FREQ_P - 1) tnext <= T_IDLE;
            else begin
              wdp_idx <= wdp_idx + 1'b1;
              tnext   <= T_WDUMP;
            end
          end else begin
            byte_i <= byte_i + 1'b1;
            tnext  <= T_WDUMP;
          end
        end
        T_GAP: tstate <= tnext;   // let tx_busy rise
        default: tstate <= T_IDLE;
      endcase
    end
  end

endmodule
