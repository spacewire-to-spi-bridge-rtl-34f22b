// SPI command interface codec (system clock domain).
//
// Takes the bytes received on SPI from the RX CDC FIFO, decodes the command
// byte ([4] wr, [3] addr_ext = mailbox region, [2:0] addr; [7:5] reserved and
// ignored), asks the bridge controller for authorisation and moves the data.
//
// Read  (MOSI: cmd, dummy, dummy, ...): the command byte starts the
//   authorisation at once. The first dummy byte triggers the reply: the size
//   byte (bytes granted, 0 when refused) and then the data bytes are pushed
//   into the TX CDC FIFO, so the size byte goes out on MISO during the fourth
//   byte of the transaction. All later MOSI bytes are ignored.
// Write (MOSI: cmd, size MSB, size LSB, data...): after the two size bytes the
//   authorisation is asked with that size; data bytes are passed to the bridge
//   and the mail is committed when `size` bytes have arrived. Extra bytes are
//   discarded, and so is the whole write when the bridge refuses it (size
//   above the maximum, mailbox full, no write right).
// A command byte arriving while an earlier transfer is unfinished aborts that
// transfer (a write is not committed, a mail read is not released).
//
// Timing: at 12.5 MHz a byte takes 640 ns, about 25 cycles of a 40 MHz system
// clock; authorisation takes two cycles and each data byte three.
//
// The command byte, the dummy bytes, the size-first reply and the two-byte
// write size follow the bridge's SPI command interface; the one-byte size of
// the read reply, refusal signalled as size 0 and the abort on a new command
// are this implementation's choices.
module mcucom
  import spw2spi_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // RX CDC FIFO read side
  output logic       rx_rd_en,
  input  logic [8:0] rx_rd_data,   // {first, byte}
  input  logic       rx_mty,
  // TX CDC FIFO write side
  output logic       tx_wr_en,
  output logic [7:0] tx_wr_data,
  input  logic       tx_full,
  // bridge controller
  output auth_req_t  auth_req,
  input  auth_rsp_t  auth_rsp,
  output dat_req_t   dat_req,
  input  dat_rsp_t   dat_rsp
);
  typedef enum logic [3:0] {
    S_IDLE, S_R_AUTH, S_R_DUMMY, S_R_SIZE, S_R_REQ, S_R_WAIT,
    S_W_MSB, S_W_LSB, S_W_AUTH, S_W_DATA, S_DISCARD
  } state_e;

  state_e      state;
  logic [23:0] size;       // bytes granted / still to move
  logic        xfer_open;    // a granted transfer is open
  logic        pop;
  logic        first;
  logic [7:0]  rbyte;

  assign first = rx_rd_data[8];
  assign rbyte = rx_rd_data[7:0];

  // Pop a received byte in every state that consumes bytes.
  always_comb begin
    unique case (state)
      S_IDLE, S_R_DUMMY, S_W_MSB, S_W_LSB, S_W_DATA, S_DISCARD: pop = !rx_mty;
      // while the reply is being produced only a new command is taken
      S_R_SIZE, S_R_REQ, S_R_WAIT: pop = !rx_mty && !first;
      default: pop = 1'b0;
    endcase
  end
  assign rx_rd_en = pop;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      size       <= '0;
      xfer_open    <= 1'b0;
      auth_req   <= '0;
      dat_req    <= '0;
      tx_wr_en   <= 1'b0;
      tx_wr_data <= '0;
    end else begin
      dat_req  <= '0;
      tx_wr_en <= 1'b0;

      if (pop && first) begin
        // New command.
        if (xfer_open) dat_req.cancel <= 1'b1;
        xfer_open       <= 1'b0;
        auth_req.wr   <= rbyte[SPI_CMD_WR];
        auth_req.mbx  <= rbyte[SPI_CMD_ADDR_EXT];
        auth_req.addr <= 32'(rbyte[2:0]);
        auth_req.size <= '1;
        if (rbyte[SPI_CMD_WR]) begin
          state <= S_W_MSB;
        end else begin
          auth_req.req <= 1'b1;
          state        <= S_R_AUTH;
        end
      end else begin
        unique case (state)
          S_IDLE, S_DISCARD: ;
          S_R_AUTH: if (auth_rsp.gnt || auth_rsp.rej) begin
            auth_req.req <= 1'b0;
            xfer_open      <= auth_rsp.gnt;
            size         <= auth_rsp.gnt ? auth_rsp.size : '0;
            state        <= S_R_DUMMY;
          end
          S_R_DUMMY: if (pop) state <= S_R_SIZE;
          S_R_SIZE: if (!tx_full) begin
            tx_wr_en   <= 1'b1;
            tx_wr_data <= size[7:0];
            state      <= (size == '0) ? S_DISCARD : S_R_REQ;
          end
          S_R_REQ: if (!tx_full && !tx_wr_en) begin
            dat_req.rd_en <= 1'b1;
            state         <= S_R_WAIT;
          end
          S_R_WAIT: if (dat_rsp.rd_valid) begin
            tx_wr_en   <= 1'b1;
            tx_wr_data <= dat_rsp.rd_data;
            size       <= size - 1'b1;
            if (size == 24'd1) begin
              dat_req.done <= 1'b1;
              xfer_open      <= 1'b0;
              state        <= S_DISCARD;
            end else begin
              state <= S_R_REQ;
            end
          end
          S_W_MSB: if (pop) begin
            auth_req.size <= {8'h00, rbyte, 8'h00};
            state         <= S_W_LSB;
          end
          S_W_LSB: if (pop) begin
            auth_req.size[7:0] <= rbyte;
            auth_req.req       <= 1'b1;
            state              <= S_W_AUTH;
          end
          S_W_AUTH: if (auth_rsp.gnt || auth_rsp.rej) begin
            auth_req.req <= 1'b0;
            xfer_open      <= auth_rsp.gnt;
            size         <= auth_req.size;
            state        <= auth_rsp.gnt ? S_W_DATA : S_DISCARD;
          end
          S_W_DATA: if (pop) begin
            dat_req.wr_en   <= 1'b1;
            dat_req.wr_data <= rbyte;
            size            <= size - 1'b1;
            if (size == 24'd1) begin
              dat_req.done <= 1'b1;
              xfer_open      <= 1'b0;
              state        <= S_DISCARD;
            end
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end
endmodule
