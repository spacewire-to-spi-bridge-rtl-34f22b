// SpaceWire RMAP target: command decoder, target controller and reply encoder.
//
// A partial RMAP target (ECSS-E-ST-50-52C) for the bridge. It takes N-chars
// from the codec's receive FIFO and writes N-chars to its transmit FIFO.
// Supported commands, with logical addressing and no reply address:
//   0x48  read, reply, no increment
//   0x60  write, no verify, no acknowledge, no increment
// Header (16 bytes): target logical address, protocol id (0x01), instruction,
// key, initiator logical address, transaction id (2), extended address,
// address (4), data length (3), header CRC. Target logical address and key
// are not checked. Extended address 0x01 selects the mailbox region, 0x00 the
// registers; the 32-bit address is the register byte address or mailbox
// number.
//
// Command decoder: collects the header while computing the RMAP CRC-8;
// a packet with a bad header CRC, another protocol id or another instruction
// is skipped up to its end marker. Target controller: passes operation,
// region, address and data length to the bridge controller for
// authorisation. A write streams its data bytes to the bridge as they arrive
// and commits them only when the data CRC is right and EOP follows;
// otherwise the mail is discarded (the bridge's two-slot mailbox keeps the
// previous mail intact). A read waits for the EOP that ends the command,
// is authorised, and then the reply encoder sends
//   initiator LA, 0x01, instruction with the command bit cleared, status,
//   target LA, transaction id (2), 0x00, data length (3), header CRC,
//   data, data CRC, EOP
// with status 0 and the granted length, or status 10 (command not
// authorised) and length 0 when the bridge refuses.
//
// Decoder/controller/encoder split and the supported command subset follow
// the bridge's RMAP target; its internal timing diagrams are not available,
// so the byte-level sequencing is this implementation's. The reply to a
// refused read and the RX/TX data FIFOs being left out (data goes straight
// to the bridge) are departures of this implementation.
module rmap_target
  import spw2spi_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  // codec host RX
  input  logic      rx_valid,
  output logic      rx_ready,
  input  nchar_t    rx_data,
  // codec host TX
  output logic      tx_valid,
  input  logic      tx_ready,
  output nchar_t    tx_data,
  // bridge controller
  output auth_req_t auth_req,
  input  auth_rsp_t auth_rsp,
  output dat_req_t  dat_req,
  input  dat_rsp_t  dat_rsp,
  // statistics for the host
  output logic      cmd_ok,      // pulse: command executed
  output logic      cmd_err      // pulse: command refused or corrupt
);
  typedef enum logic [3:0] {
    S_HDR, S_R_EOP, S_AUTH, S_W_DATA, S_W_CRC, S_W_EOP,
    S_REPLY, S_R_REQ, S_R_WAIT, S_R_DCRC, S_R_END, S_R_LAST, S_DISCARD
  } state_e;

  localparam logic [7:0] INSTR_READ  = 8'h48;
  localparam logic [7:0] INSTR_WRITE = 8'h60;
  localparam logic [7:0] ST_NOT_AUTH = 8'd10;

  state_e      state;
  logic [3:0]  idx;
  logic [7:0]  crc, tla, instr, ila, ext, status;
  logic [15:0] tid;
  logic [31:0] addr;
  logic [23:0] len, cnt;
  logic        granted, crc_ok;
  logic        take;
  logic [7:0]  rbyte;
  logic        is_ctrl;

  assign rbyte   = rx_data[7:0];
  assign is_ctrl = rx_data[8];

  always_comb begin
    unique case (state)
      S_HDR, S_R_EOP, S_W_DATA, S_W_CRC, S_W_EOP, S_DISCARD: rx_ready = 1'b1;
      default: rx_ready = 1'b0;
    endcase
  end
  assign take = rx_valid && rx_ready;

  // Reply header byte idx (0..10).
  function automatic logic [7:0] reply_byte(input logic [3:0] i);
    unique case (i)
      4'd0:    return ila;
      4'd1:    return RMAP_PROTOCOL_ID;
      4'd2:    return instr & 8'hBF;
      4'd3:    return status;
      4'd4:    return tla;
      4'd5:    return tid[15:8];
      4'd6:    return tid[7:0];
      4'd7:    return 8'h00;
      4'd8:    return cnt[23:16];
      4'd9:    return cnt[15:8];
      default: return cnt[7:0];
    endcase
  endfunction

  always_ff @(posedge clk) begin
    logic [7:0] c;
    if (!rst_n) begin
      state    <= S_HDR;
      idx      <= '0;
      crc      <= '0;
      {tla, instr, ila, ext, status} <= '0;
      tid      <= '0;
      addr     <= '0;
      len      <= '0;
      cnt      <= '0;
      granted  <= 1'b0;
      crc_ok   <= 1'b0;
      auth_req <= '0;
      dat_req  <= '0;
      tx_valid <= 1'b0;
      tx_data  <= '0;
      cmd_ok   <= 1'b0;
      cmd_err  <= 1'b0;
    end else begin
      dat_req <= '0;
      cmd_ok  <= 1'b0;
      cmd_err <= 1'b0;
      c = rmap_crc8(crc, rbyte);

      unique case (state)
        // ------------------------------------------------ command decoder
        S_HDR: if (take) begin
          if (is_ctrl) begin
            idx <= '0;
            crc <= '0;
            if (idx != '0) cmd_err <= 1'b1;   // packet ended inside the header
          end else begin
            crc <= c;
            idx <= idx + 1'b1;
            unique case (idx)
              4'd0:  tla   <= rbyte;
              4'd2:  instr <= rbyte;
              4'd4:  ila   <= rbyte;
              4'd5:  tid[15:8]   <= rbyte;
              4'd6:  tid[7:0]    <= rbyte;
              4'd7:  ext         <= rbyte;
              4'd8:  addr[31:24] <= rbyte;
              4'd9:  addr[23:16] <= rbyte;
              4'd10: addr[15:8]  <= rbyte;
              4'd11: addr[7:0]   <= rbyte;
              4'd12: len[23:16]  <= rbyte;
              4'd13: len[15:8]   <= rbyte;
              4'd14: len[7:0]    <= rbyte;
              default: ;
            endcase
            if (idx == 4'd1 && rbyte != RMAP_PROTOCOL_ID) begin
              state <= S_DISCARD;        // not an RMAP packet
            end
            if (idx == 4'd15) begin
              idx <= '0;
              crc <= '0;
              if (c != 8'h00) begin
                state <= S_DISCARD; cmd_err <= 1'b1;
              end else if (instr == INSTR_WRITE) begin
                auth_req <= '{req: 1'b1, wr: 1'b1, mbx: (ext == 8'h01), addr: addr, size: len};
                state    <= S_AUTH;
              end else if (instr == INSTR_READ) begin
                state <= S_R_EOP;
              end else begin
                state <= S_DISCARD; cmd_err <= 1'b1;
              end
            end
          end
        end
        S_R_EOP: if (take) begin
          if (rx_data == NCHAR_EOP) begin
            auth_req <= '{req: 1'b1, wr: 1'b0, mbx: (ext == 8'h01), addr: addr, size: len};
            state    <= S_AUTH;
          end else begin
            cmd_err <= 1'b1;
            state   <= is_ctrl ? S_HDR : S_DISCARD;
          end
        end
        // ---------------------------------------------- target controller
        S_AUTH: if (auth_rsp.gnt || auth_rsp.rej) begin
          auth_req.req <= 1'b0;
          granted      <= auth_rsp.gnt;
          // the extended address must be 0x00 or 0x01
          if (ext[7:1] != 7'd0 && auth_rsp.gnt) begin
            dat_req.cancel <= 1'b1;
            granted        <= 1'b0;
          end
          if (auth_req.wr) begin
            cnt   <= len;
            state <= (auth_rsp.gnt && ext[7:1] == 7'd0) ? S_W_DATA : S_DISCARD;
            if (!(auth_rsp.gnt && ext[7:1] == 7'd0)) cmd_err <= 1'b1;
          end else begin
            if (auth_rsp.gnt && ext[7:1] == 7'd0) begin
              cnt    <= auth_rsp.size;
              status <= 8'd0;
            end else begin
              cnt     <= '0;
              status  <= ST_NOT_AUTH;
              cmd_err <= 1'b1;
            end
            idx   <= '0;
            state <= S_REPLY;
          end
        end
        S_W_DATA: if (take) begin
          if (is_ctrl) begin              // early end of packet
            dat_req.cancel <= 1'b1; cmd_err <= 1'b1; state <= S_HDR;
          end else begin
            dat_req.wr_en   <= 1'b1;
            dat_req.wr_data <= rbyte;
            crc <= c;
            cnt <= cnt - 1'b1;
            if (cnt == 24'd1) state <= S_W_CRC;
          end
        end
        S_W_CRC: if (take) begin
          if (is_ctrl) begin
            dat_req.cancel <= 1'b1; cmd_err <= 1'b1; state <= S_HDR;
          end else begin
            crc_ok <= (c == 8'h00);
            crc    <= '0;
            state  <= S_W_EOP;
          end
        end
        S_W_EOP: if (take) begin
          if (rx_data == NCHAR_EOP && crc_ok) begin
            dat_req.done <= 1'b1; cmd_ok <= 1'b1;
          end else begin
            dat_req.cancel <= 1'b1; cmd_err <= 1'b1;
          end
          state <= is_ctrl ? S_HDR : S_DISCARD;
        end
        // -------------------------------------------------- reply encoder
        S_REPLY: begin
          if (!tx_valid || tx_ready) begin
            tx_valid <= 1'b1;
            if (idx == 4'd11) begin
              tx_data <= {1'b0, crc};
              crc     <= '0;
              state   <= (cnt == '0) ? S_R_DCRC : S_R_REQ;
              tx_valid <= 1'b1;
            end else begin
              tx_data <= {1'b0, reply_byte(idx)};
              crc     <= rmap_crc8(crc, reply_byte(idx));
              idx     <= idx + 1'b1;
            end
          end
        end
        S_R_REQ: if (tx_ready || !tx_valid) begin
          tx_valid      <= 1'b0;
          dat_req.rd_en <= 1'b1;
          state         <= S_R_WAIT;
        end
        S_R_WAIT: if (dat_rsp.rd_valid) begin
          tx_valid <= 1'b1;
          tx_data  <= {1'b0, dat_rsp.rd_data};
          crc      <= rmap_crc8(crc, dat_rsp.rd_data);
          cnt      <= cnt - 1'b1;
          state    <= (cnt == 24'd1) ? S_R_DCRC : S_R_REQ;
        end
        S_R_DCRC: if (tx_ready || !tx_valid) begin
          tx_valid <= 1'b1;
          tx_data  <= {1'b0, crc};
          state    <= S_R_END;
        end
        S_R_END: if (tx_ready) begin
          tx_valid <= 1'b1;
          tx_data  <= NCHAR_EOP;
          state    <= S_R_LAST;
          if (granted) begin dat_req.done <= 1'b1; cmd_ok <= 1'b1; end
          granted  <= 1'b0;
        end
        S_R_LAST: if (tx_ready) begin      // EOP taken
          tx_valid <= 1'b0;
          idx      <= '0;
          crc      <= '0;
          state    <= S_HDR;
        end
        S_DISCARD: if (take && is_ctrl) begin
          idx   <= '0;
          crc   <= '0;
          state <= S_HDR;
        end
        default: state <= S_HDR;
      endcase
    end
  end
endmodule
