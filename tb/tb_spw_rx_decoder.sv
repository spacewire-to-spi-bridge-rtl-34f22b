// Testbench for spw_rx_decoder (SMP = 2, 4 bits per word). Bit streams
// built by the reference model are offered through a FIFO model with random
// empty gaps. Checks: hunting starts at a NULL at any bit offset; NULL, FCT
// and N-chars are reported in order with the right data; a parity error, an
// ESC followed by EOP and a line that stops (disconnect) are each reported,
// and rx_reset brings the decoder back to hunting.
`timescale 1ns/1ps
module tb_spw_rx_decoder;
  import spw2spi_pkg::*;
  import spw_bits_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, rx_reset = 1'b0, rd_en, rd_mty = 1'b1;
  logic [3:0] rd_data = '0;
  rx_evt_t evt;
  bit fifo_bits[$];
  int got[$];
  int n_par = 0, n_esc = 0, n_disc = 0;
  int checks = 0, failures = 0;
  bit gaps = 1'b1;
  always #12.5 clk = ~clk;

  spw_rx_decoder #(.SMP(2), .DISC_CYCLES(34)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // FIFO model: a word is available when 4 bits are queued (and no gap)
  always @(posedge clk) begin
    if (rd_en && !rd_mty) repeat (4) void'(fifo_bits.pop_front());
    if (evt.got_null)  got.push_back(CH_NULL);
    if (evt.got_fct)   got.push_back(CH_FCT);
    if (evt.got_nchar) got.push_back(evt.nchar[8] ? (evt.nchar[0] ? CH_EEP : CH_EOP) : int'(evt.nchar[7:0]));
    if (evt.err_par)   n_par++;
    if (evt.err_esc)   n_esc++;
    if (evt.err_disc)  n_disc++;
    #1;
    rd_mty  = (fifo_bits.size() < 4) || (gaps && $urandom_range(0, 3) == 0);
    rd_data = (fifo_bits.size() < 4) ? 4'h0 : {fifo_bits[0], fifo_bits[1], fifo_bits[2], fifo_bits[3]};
  end

  task automatic send(input bitq_t b);
    foreach (b[i]) fifo_bits.push_back(b[i]);
    while (fifo_bits.size() >= 4) @(posedge clk);
  endtask

  task automatic do_reset();
    @(negedge clk) rx_reset = 1'b1;
    fifo_bits = {};
    @(negedge clk) rx_reset = 1'b0;
    got = {};
  endtask

  initial begin
    spw_line tx;
    bitq_t b;
    int exp_ch[$];
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (3) @(negedge clk);
    got = {}; n_par = 0; n_esc = 0; n_disc = 0;

    for (int run = 0; run < 6; run++) begin
      // 1. clean stream with random leading junk bits (no NULL pattern)
      tx = new();
      b = {};
      repeat (run) b.push_back(1'b0);
      exp_ch = {};
      tx.encode(b, CH_NULL); exp_ch.push_back(CH_NULL);
      for (int i = 0; i < 200; i++) begin
        int k, ch;
        k = $urandom_range(0, 9);
        ch = (k == 0) ? CH_NULL : (k == 1) ? CH_FCT : (k == 2) ? CH_EOP : (k == 3) ? CH_EEP : $urandom_range(0, 255);
        tx.encode(b, ch);
        exp_ch.push_back(ch);
      end
      tx.encode(b, CH_NULL); exp_ch.push_back(CH_NULL);  // flush
      send(b);
      repeat (20) @(posedge clk);
      check(got.size() >= exp_ch.size() - 1, $sformatf("run %0d: %0d chars for %0d", run, got.size(), exp_ch.size()));
      for (int i = 0; i < exp_ch.size() - 1 && i < got.size(); i++)
        check(got[i] == exp_ch[i], $sformatf("run %0d char %0d: %0d expected %0d", run, i, got[i], exp_ch[i]));
      check(n_par == 0 && n_esc == 0, "no error on a clean stream");
      do_reset();
    end

    // 2. parity error: flip the parity bit of a data character
    tx = new(); b = {};
    tx.encode(b, CH_NULL); tx.encode(b, 8'h5A);
    b[8] = ~b[8];
    tx.encode(b, CH_NULL); tx.encode(b, CH_NULL);
    send(b);
    repeat (20) @(posedge clk);
    check(n_par == 1, $sformatf("parity error reported (%0d)", n_par));
    do_reset();

    // 3. escape error: ESC then EOP
    tx = new(); b = {};
    tx.encode(b, CH_NULL); tx.encode(b, CH_ESC); tx.encode(b, CH_EOP);
    tx.encode(b, CH_NULL); tx.encode(b, CH_NULL);
    send(b);
    repeat (20) @(posedge clk);
    check(n_esc == 1, $sformatf("escape error reported (%0d)", n_esc));
    do_reset();

    // 4. disconnect: the line stops after some NULLs
    gaps = 1'b0;
    tx = new(); b = {};
    repeat (4) tx.encode(b, CH_NULL);
    send(b);
    repeat (30) @(posedge clk);
    check(n_disc == 0, "no disconnect before the timeout");
    repeat (20) @(posedge clk);
    check(n_disc == 1, $sformatf("disconnect reported (%0d)", n_disc));
    do_reset();

    // 5. after the reset the decoder works again
    gaps = 1'b1;
    tx = new(); b = {};
    tx.encode(b, CH_NULL); tx.encode(b, 8'hC3); tx.encode(b, CH_EOP); tx.encode(b, CH_NULL); tx.encode(b, CH_NULL);
    send(b);
    repeat (20) @(posedge clk);
    check(got.size() >= 3 && got[1] == 8'hC3 && got[2] == CH_EOP, "decoding after rx_reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
