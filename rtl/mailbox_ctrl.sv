// Two-slot mailbox RAM controller.
//
// A mailbox carries whole "mails" (chunks of up to MAX_SIZE bytes) from one
// link to the other. Its memory holds two slots of MAX_SIZE bytes each; a
// slot's base pointer is its index times MAX_SIZE, so the client only ever
// names the mailbox, never a memory address. The writer fills the write slot
// through a current pointer and commits it with wr_commit; the reader drains
// the oldest full slot and frees it with rd_done.
//
// Slot switching (the "RAM slot switch FSM"): when a write is committed and
// the other slot is empty, the writer moves to the other slot at once, so the
// mailbox can take the next mail while the first is being read. When both
// slots are full the writer waits; the read that frees a slot hands it over.
// wr_rdy is high when the write slot is empty, rd_avail when the read slot is
// full; data_size is the size of the mail in the read slot.
//
// Timing: rd_en requests the next byte of the read slot; rd_data is valid one
// clock later with rd_valid (registered RAM output). wr_abort discards a
// partly written mail; rd_abort rewinds the read pointer and keeps the mail.
// A commit with no byte written is ignored. If a read completes and a write
// commits in the same clock, the read is applied first.
//
// The two slots, the switching rule and the base/current pointer, max_size and
// data_size fields follow the bridge's mailbox description; the port set and
// the abort behaviour are this implementation's choice.
module mailbox_ctrl #(
  parameter int unsigned MAX_SIZE = 32,   // bytes per slot, power of two
  localparam int unsigned PW = $clog2(MAX_SIZE),
  localparam int unsigned SW = $clog2(MAX_SIZE + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // writer
  input  logic          wr_en,
  input  logic [7:0]    wr_data,
  input  logic          wr_commit,
  input  logic          wr_abort,
  output logic          wr_rdy,
  // reader
  input  logic          rd_en,
  output logic [7:0]    rd_data,
  output logic          rd_valid,
  input  logic          rd_done,
  input  logic          rd_abort,
  output logic          rd_avail,
  output logic [SW-1:0] data_size
);
  logic          wslot, rslot;          // slot index of writer / reader
  logic [1:0]    full;
  logic [SW-1:0] size [2];
  logic [SW-1:0] wcurr;                 // write current pointer (bytes written)
  logic [PW-1:0] rcurr;                 // read current pointer
  logic          ram_we;

  assign wr_rdy    = !full[wslot];
  assign rd_avail  = full[rslot];
  assign data_size = size[rslot];
  assign ram_we    = wr_en && wr_rdy && (wcurr < SW'(MAX_SIZE));

  byte_ram #(.SIZE(2 * MAX_SIZE)) u_ram (
    .clk     (clk),
    .wr_en   (ram_we),
    .wr_addr ({wslot, wcurr[PW-1:0]}),
    .wr_data (wr_data),
    .rd_addr ({rslot, rcurr}),
    .rd_data (rd_data)
  );

  always_ff @(posedge clk) begin
    logic       ws, rs;
    logic [1:0] f;
    if (!rst_n) begin
      wslot    <= 1'b0;
      rslot    <= 1'b0;
      full     <= '0;
      size[0]  <= '0;
      size[1]  <= '0;
      wcurr    <= '0;
      rcurr    <= '0;
      rd_valid <= 1'b0;
    end else begin
      ws = wslot;
      rs = rslot;
      f  = full;

      rd_valid <= rd_en && f[rs];
      if (rd_en && f[rs]) rcurr <= rcurr + 1'b1;

      // Reader side first.
      if (rd_done && f[rs]) begin
        f[rs] = 1'b0;
        rs    = !rs;
        if (f[ws]) ws = !ws;           // blocked writer takes the freed slot
        rcurr <= '0;
      end else if (rd_abort || rd_done) begin
        rcurr <= '0;
      end

      // Writer side.
      if (ram_we) wcurr <= wcurr + 1'b1;
      if (wr_commit && !f[ws] && (wcurr != '0 || ram_we)) begin
        f[ws]    = 1'b1;
        size[ws] <= wcurr + SW'(ram_we);   // a byte may arrive with the commit
        if (!f[!ws]) ws = !ws;         // other slot empty: switch at once
        wcurr <= '0;
      end else if (wr_abort || wr_commit) begin
        wcurr <= '0;
      end

      wslot <= ws;
      rslot <= rs;
      full  <= f;
    end
  end
endmodule
