// Testbench for mailbox_ctrl (two-slot mailbox). A writer process sends
// mails of random length (sometimes abandoning one with wr_abort, sometimes
// giving the last byte in the commit cycle); a reader process reads each
// mail (sometimes restarting it with rd_abort) and frees it with rd_done.
// A queue of committed mails is the reference: data, sizes, wr_rdy (free
// slot) and rd_avail must agree with it. Uses MAX_SIZE = 32 (the TC size).
`timescale 1ns/1ps
module tb_mailbox_ctrl;
  localparam int MAX = 32;
  localparam int SW  = $clog2(MAX + 1);
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic wr_en = 0, wr_commit = 0, wr_abort = 0, wr_rdy;
  logic [7:0] wr_data = '0, rd_data;
  logic rd_en = 0, rd_valid, rd_done = 0, rd_abort = 0, rd_avail;
  logic [SW-1:0] data_size;
  typedef logic [7:0] mail_t[$];
  mail_t mails[$];
  int checks = 0, failures = 0;
  int n_commit = 0, n_wabort = 0, n_rabort = 0, n_both_full = 0, n_read = 0;
  localparam int N = 300;

  mailbox_ctrl #(.MAX_SIZE(MAX)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // flags against the model, sampled between edges
  always @(posedge clk) if (rst_n) begin
    #2;
    check(wr_rdy == (mails.size() < 2), $sformatf("wr_rdy %0d with %0d mails", wr_rdy, mails.size()));
    check(rd_avail == (mails.size() > 0), "rd_avail");
    if (mails.size() == 2) n_both_full++;
  end

  // writer
  initial begin
    @(posedge rst_n);
    for (int m = 0; m < N; m++) begin
      mail_t d;
      int len;
      bit abandon, last_in_commit;
      d = {};
      len = $urandom_range(1, MAX);
      abandon = ($urandom_range(0, 9) == 0);
      last_in_commit = $urandom_range(0, 1);
      while (!wr_rdy) @(negedge clk);
      for (int i = 0; i < len; i++) begin
        repeat ($urandom_range(0, 2)) @(negedge clk);
        wr_en = 1'b1;
        wr_data = 8'($urandom);
        d.push_back(wr_data);
        if (i == len - 1 && last_in_commit) begin
          if (abandon) wr_abort = 1'b1; else wr_commit = 1'b1;
        end
        @(posedge clk);
        if (i == len - 1 && last_in_commit && !abandon) mails.push_back(d);
        @(negedge clk);
        wr_en = 1'b0; wr_commit = 1'b0; wr_abort = 1'b0;
      end
      if (!last_in_commit) begin
        if (abandon) wr_abort = 1'b1; else wr_commit = 1'b1;
        @(posedge clk);
        if (!abandon) mails.push_back(d);
        @(negedge clk);
        wr_commit = 1'b0; wr_abort = 1'b0;
      end
      if (abandon) n_wabort++;
      else n_commit++;
    end
  end

  // reader
  initial begin
    @(posedge rst_n);
    while (n_read < N - n_wabort || n_read == 0) begin
      mail_t exp;
      int lim;
      bit restart;
      @(negedge clk);
      if (!rd_avail) continue;
      repeat ($urandom_range(0, 40)) @(negedge clk);   // let the writer fill both slots
      exp = mails[0];
      check(data_size == SW'(exp.size()), $sformatf("size %0d expected %0d", data_size, exp.size()));
      restart = ($urandom_range(0, 7) == 0);
      lim = restart ? $urandom_range(0, exp.size() - 1) : exp.size();
      for (int i = 0; i < lim; i++) begin
        rd_en = 1'b1;
        @(negedge clk);
        rd_en = 1'b0;
        check(rd_valid && rd_data == exp[i], $sformatf("mail %0d byte %0d: %h expected %h", n_read, i, rd_data, exp[i]));
      end
      if (restart) begin
        rd_abort = 1'b1; n_rabort++;
      end else begin
        rd_done = 1'b1; n_read++;
      end
      @(posedge clk);
      if (rd_done) void'(mails.pop_front());
      @(negedge clk);
      rd_abort = 1'b0; rd_done = 1'b0;
    end
    check(n_wabort > 0 && n_rabort > 0 && n_both_full > 0, "aborts and two full slots exercised");
    $display("mails %0d, writer aborts %0d, reader restarts %0d, cycles with both slots full %0d",
             n_read, n_wabort, n_rabort, n_both_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
  end
  initial begin
    #5ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
