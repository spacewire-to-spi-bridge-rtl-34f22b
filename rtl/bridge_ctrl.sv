// Bridge controller with its RAM controllers.
//
// Two link controllers (index 0 = SPI slave, index 1 = SpaceWire RMAP target)
// ask for access with an authorisation request: read or write, register or
// mailbox region, address and size. The controller checks the request against
// the memory map and the access rights, and against the state of the data
// resource (a full mailbox cannot be written, an empty one cannot be read, a
// size above the mailbox's maximum is refused). It answers with a one-cycle
// gnt or rej. A granted request opens a transfer on that side, during which the
// side's data bundle is steered to the chosen RAM controller; the transfer ends
// with done (a mailbox write is committed, a mailbox read frees its slot) or
// cancel (nothing is committed or freed).
//
// Access rights:
//   SPI:       read spi_comstat (1) and tc_size (2); write lewis_features (5);
//              read the TC mailbox (0); write the TM mailbox (1).
//   SpaceWire: read spw_comstat (0), tm_size (3) and lewis_features (5);
//              write the TC mailbox (0); read the TM mailbox (1).
// A read is granted for the smaller of the size asked for and the size held
// (the register length or the mail size); gnt carries that size.
//
// RAM controllers: one register RAM controller and two two-slot mailbox
// controllers (TC, TM). Read data arrives one clock after rd_en.
//
// Authorisation, the register/mailbox split and the (de)multiplexing follow
// the bridge's description; the rule set above is read off its register and
// mailbox tables. The request/grant bundle is this implementation's own.
module bridge_ctrl
  import spw2spi_pkg::*;
#(
  parameter int unsigned TC_SIZE = TC_MAX_BYTES,
  parameter int unsigned TM_SIZE = TM_MAX_BYTES
) (
  input  logic           clk,
  input  logic           rst_n,
  input  auth_req_t [1:0] auth_req,
  output auth_rsp_t [1:0] auth_rsp,
  input  dat_req_t  [1:0] dat_req,
  output dat_rsp_t  [1:0] dat_rsp,
  // status flags, also visible through the registers
  output logic           tc_rdy,     // TC mailbox can be written (SpW)
  output logic           tc_valid,   // TC mailbox can be read (SPI)
  output logic           tm_rdy,     // TM mailbox can be written (SPI)
  output logic           tm_valid    // TM mailbox can be read (SpW)
);
  typedef enum logic [2:0] { T_NONE, T_REG_RD, T_FEAT_WR, T_TC_WR, T_TC_RD, T_TM_WR, T_TM_RD } tgt_e;

  localparam int unsigned TCW = $clog2(TC_SIZE + 1);
  localparam int unsigned TMW = $clog2(TM_SIZE + 1);

  tgt_e       tgt  [2];
  logic [4:0] ridx [2];          // register byte address of the next access

  logic [TCW-1:0] tc_dsize;
  logic [TMW-1:0] tm_dsize;
  logic [7:0]     tc_rdata, tm_rdata;
  logic           tc_rvalid, tm_rvalid;
  logic [1:0]       reg_rd_en;
  logic [1:0][4:0]  reg_rd_addr;
  logic [1:0][7:0]  reg_rd_data;
  logic [1:0]       reg_rvalid;

  // ------------------------------------------------------- RAM controllers
  // TC: SpW (1) writes, SPI (0) reads. TM: SPI (0) writes, SpW (1) reads.
  mailbox_ctrl #(.MAX_SIZE(TC_SIZE)) u_tc (
    .clk, .rst_n,
    .wr_en     (tgt[1] == T_TC_WR && dat_req[1].wr_en),
    .wr_data   (dat_req[1].wr_data),
    .wr_commit (tgt[1] == T_TC_WR && dat_req[1].done),
    .wr_abort  (tgt[1] == T_TC_WR && dat_req[1].cancel),
    .wr_rdy    (tc_rdy),
    .rd_en     (tgt[0] == T_TC_RD && dat_req[0].rd_en),
    .rd_data   (tc_rdata),
    .rd_valid  (tc_rvalid),
    .rd_done   (tgt[0] == T_TC_RD && dat_req[0].done),
    .rd_abort  (tgt[0] == T_TC_RD && dat_req[0].cancel),
    .rd_avail  (tc_valid),
    .data_size (tc_dsize)
  );

  mailbox_ctrl #(.MAX_SIZE(TM_SIZE)) u_tm (
    .clk, .rst_n,
    .wr_en     (tgt[0] == T_TM_WR && dat_req[0].wr_en),
    .wr_data   (dat_req[0].wr_data),
    .wr_commit (tgt[0] == T_TM_WR && dat_req[0].done),
    .wr_abort  (tgt[0] == T_TM_WR && dat_req[0].cancel),
    .wr_rdy    (tm_rdy),
    .rd_en     (tgt[1] == T_TM_RD && dat_req[1].rd_en),
    .rd_data   (tm_rdata),
    .rd_valid  (tm_rvalid),
    .rd_done   (tgt[1] == T_TM_RD && dat_req[1].done),
    .rd_abort  (tgt[1] == T_TM_RD && dat_req[1].cancel),
    .rd_avail  (tm_valid),
    .data_size (tm_dsize)
  );

  always_comb begin
    for (int s = 0; s < 2; s++) begin
      reg_rd_en[s]   = (tgt[s] == T_REG_RD) && dat_req[s].rd_en;
      reg_rd_addr[s] = ridx[s];
    end
  end

  reg_ram_ctrl u_regs (
    .clk, .rst_n,
    .tc_rdy       (tc_rdy),
    .tm_valid     (tm_valid),
    .tc_valid     (tc_valid),
    .tm_rdy       (tm_rdy),
    .tc_size      (6'(tc_dsize)),
    .tm_size      (12'(tm_dsize)),
    .feat_wr_en   (tgt[0] == T_FEAT_WR && dat_req[0].wr_en),
    .feat_wr_idx  (ridx[0] - 5'd5),
    .feat_wr_data (dat_req[0].wr_data),
    .rd_en        (reg_rd_en),
    .rd_addr      (reg_rd_addr),
    .rd_data      (reg_rd_data)
  );

  // ------------------------------------------------------- authorisation
  function automatic logic [23:0] min24(input logic [23:0] a, input logic [23:0] b);
    return (a < b) ? a : b;
  endfunction

  // Decide one request: returns the transfer target (T_NONE = reject) and the
  // size granted.
  function automatic void authorise(input logic s, input logic r_wr, input logic r_mbx,
                                    input logic [31:0] r_addr, input logic [23:0] r_size,
                                    output tgt_e t, output logic [23:0] sz);
    t  = T_NONE;
    sz = '0;
    if (!r_mbx) begin
      if (!r_wr) begin
        if (s == SIDE_SPI && r_addr == REG_SPI_COMSTAT) begin t = T_REG_RD; sz = 24'd1; end
        if (s == SIDE_SPI && r_addr == REG_TC_SIZE)     begin t = T_REG_RD; sz = 24'd1; end
        if (s == SIDE_SPW && r_addr == REG_SPW_COMSTAT) begin t = T_REG_RD; sz = 24'd1; end
        if (s == SIDE_SPW && r_addr == REG_TM_SIZE)     begin t = T_REG_RD; sz = 24'd2; end
        if (s == SIDE_SPW && r_addr == REG_FEATURES)    begin t = T_REG_RD; sz = 24'(FEATURES_BYTES); end
        sz = min24(sz, r_size);
        if (sz == '0) t = T_NONE;
      end else if (s == SIDE_SPI && r_addr == REG_FEATURES &&
                   r_size != '0 && r_size <= 24'(FEATURES_BYTES)) begin
        t = T_FEAT_WR; sz = r_size;
      end
    end else begin
      if (s == SIDE_SPW && r_wr && r_addr == MBX_TC && tc_rdy &&
          r_size != '0 && r_size <= 24'(TC_SIZE)) begin
        t = T_TC_WR; sz = r_size;
      end
      if (s == SIDE_SPI && r_wr && r_addr == MBX_TM && tm_rdy &&
          r_size != '0 && r_size <= 24'(TM_SIZE)) begin
        t = T_TM_WR; sz = r_size;
      end
      if (s == SIDE_SPI && !r_wr && r_addr == MBX_TC && tc_valid) begin
        t = T_TC_RD; sz = min24(24'(tc_dsize), r_size);
      end
      if (s == SIDE_SPW && !r_wr && r_addr == MBX_TM && tm_valid) begin
        t = T_TM_RD; sz = min24(24'(tm_dsize), r_size);
      end
      if (!r_wr && sz == '0) t = T_NONE;
    end
  endfunction

  always_ff @(posedge clk) begin
    tgt_e        t;
    logic [23:0] sz;
    if (!rst_n) begin
      for (int s = 0; s < 2; s++) begin
        tgt[s]      <= T_NONE;
        ridx[s]     <= '0;
        auth_rsp[s] <= '0;
      end
      reg_rvalid <= '0;
    end else begin
      for (int s = 0; s < 2; s++) begin
        auth_rsp[s].gnt <= 1'b0;
        auth_rsp[s].rej <= 1'b0;
        reg_rvalid[s]   <= reg_rd_en[s];
        if (tgt[s] == T_NONE) begin
          if (auth_req[s].req && !auth_rsp[s].gnt && !auth_rsp[s].rej) begin
            authorise(1'(s), auth_req[s].wr, auth_req[s].mbx, auth_req[s].addr, auth_req[s].size, t, sz);
            tgt[s]           <= t;
            ridx[s]          <= auth_req[s].addr[4:0];
            auth_rsp[s].gnt  <= (t != T_NONE);
            auth_rsp[s].rej  <= (t == T_NONE);
            auth_rsp[s].size <= sz;
          end
        end else begin
          if ((tgt[s] == T_REG_RD && dat_req[s].rd_en) ||
              (tgt[s] == T_FEAT_WR && dat_req[s].wr_en))
            ridx[s] <= ridx[s] + 1'b1;
          if (dat_req[s].done || dat_req[s].cancel) tgt[s] <= T_NONE;
        end
      end
    end
  end

  // ------------------------------------------------------- read data return
  always_comb begin
    dat_rsp[0].rd_valid = reg_rvalid[0] || tc_rvalid;
    dat_rsp[0].rd_data  = reg_rvalid[0] ? reg_rd_data[0] : tc_rdata;
    dat_rsp[1].rd_valid = reg_rvalid[1] || tm_rvalid;
    dat_rsp[1].rd_data  = reg_rvalid[1] ? reg_rd_data[1] : tm_rdata;
  end
endmodule
