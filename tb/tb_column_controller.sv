// tb_column_controller: self-checking test of column_controller with four
// behavioural 5-DiLogic cards.
// The testbench sends trigger control words on the link, then decodes the
// returned frame and checks it against the words predicted for each card:
// SOF/EOF with the event number and count, header, data words per card in
// order, CRC (long-division reference). It counts the Gassiplex clock pulses
// per event (48), checks that the cards were read concurrently (the frame
// comes back in far less time than reading them one after another would
// take), that a trigger during an event is dropped and counted, and that the
// link idles between frames.
module tb_column_controller;
  import cpv_pkg::*;
  import cpv_tb_pkg::*;
  localparam int unsigned N = 4, SEED = 11, STRB_DIV = 4;
  logic clk = 0, rst_n = 0;
  link_word_t rx, tx;
  logic [N-1:0] dl_en_in_n, dl_str_in_n, dl_en_out_n;
  dl_word_t dl_data [N];
  logic gas_th, gas_clk, busy;
  logic [15:0] event_no, trig_dropped, perr_count;
  int checks = 0, failures = 0, cyc = 0;
  int unsigned occ = 10;

  column_controller #(.N_CARDS(N)) dut (
    .clk, .rst_n, .col_id(6'd9), .rx, .tx, .dl_en_in_n, .dl_str_in_n, .dl_en_out_n, .dl_data,
    .gas_th, .gas_clk, .busy, .event_no, .trig_dropped, .perr_count
  );

  for (genvar c = 0; c < N; c++) begin : g_card
    dilogic_card_model #(.CARD(c), .SEED(SEED)) card (
      .occ, .th(gas_th), .gclk(gas_clk), .en_in_n(dl_en_in_n[c]), .str_in_n(dl_str_in_n[c]),
      .en_out_n(dl_en_out_n[c]), .data(dl_data[c])
    );
  end

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int gpulses = 0;
  always @(posedge gas_clk) gpulses++;

  link_word_t frame[$];
  bit in_frame = 0, got_frame = 0;
  always @(negedge clk) begin
    if (link_is_ctrl(tx, LC_SOF)) begin in_frame = 1; frame.delete(); end
    if (in_frame && !link_is_ctrl(tx, LC_IDLE)) frame.push_back(tx);
    if (link_is_ctrl(tx, LC_EOF)) begin in_frame = 0; got_frame = 1; end
    if (!in_frame && !got_frame && !link_is_ctrl(tx, LC_IDLE) && rst_n) begin
      checks++; failures++; $display("FAIL: non-idle word outside a frame");
    end
  end

  initial begin
    int unsigned occs[4] = '{10, 0, 40, 256};
    rx = LINK_IDLE;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    for (int e = 1; e <= 4; e++) begin
      int t0, t1, total, idx, maxw;
      logic [31:0] msg[$];
      occ = occs[e-1];
      gpulses = 0;
      got_frame = 0;
      rx = link_ctrl(LC_TRIG, 16'(16'h3350 + e));
      t0 = cyc;
      @(negedge clk);
      rx = LINK_IDLE;
      repeat (30) @(negedge clk);
      if (e == 2) begin
        rx = link_ctrl(LC_TRIG, 16'hDEAD);   // during the event: dropped
        @(negedge clk);
        rx = LINK_IDLE;
      end
      wait (got_frame);
      t1 = cyc;
      @(negedge clk);
      check(gpulses == CH_PER_CHIP, $sformatf("event %0d: %0d Gassiplex pulses", e, gpulses));
      check(event_no == 16'(16'h3350 + e), "event number taken from trigger");
      total = 0; maxw = 0;
      for (int c = 0; c < N; c++) begin
        int n;
        n = card_words(SEED, e, c, occs[e-1]);
        total += n;
        if (n > maxw) maxw = n;
      end
      check(frame.size() == total + 4, $sformatf("event %0d frame %0d words, expected %0d",
                                                 e, frame.size(), total + 4));
      if (frame.size() == total + 4) begin
        check(link_is_ctrl(frame[0], LC_SOF) && frame[0].data[31:16] == 16'(16'h3350 + e), "SOF");
        check(frame[1].data == {LW_TAG_HDR, 6'd9, 4'(N), 4'h0, 16'(total)}, "header");
        msg.delete();
        msg.push_back(frame[1].data);
        idx = 2;
        for (int c = 0; c < N; c++)
          for (int i = 0; i < card_words(SEED, e, c, occs[e-1]); i++) begin
            logic [31:0] expw;
            expw = {LW_TAG_DATA, 2'(c), 9'h0, 1'b0, card_word(SEED, e, c, occs[e-1], i)};
            check(frame[idx].k == 0 && frame[idx].data == expw,
                  $sformatf("event %0d card %0d word %0d: %h vs %h", e, c, i, frame[idx].data, expw));
            msg.push_back(expw);
            idx++;
          end
        check(frame[idx].data == ref_crc(msg), "CRC");
        check(link_is_ctrl(frame[idx+1], LC_EOF) && frame[idx+1].data[31:16] == 16'(total), "EOF");
      end
      // concurrent readout: the read phase lasts as long as the fullest card,
      // not the sum of all cards
      check(t1 - t0 < 8 + 2 * 2 * CH_PER_CHIP + (maxw + 2) * STRB_DIV + total + 20 + 4 * N,
            $sformatf("event %0d took %0d clocks (max card %0d words, total %0d)",
                      e, t1 - t0, maxw, total));
      repeat (20) @(negedge clk);
      check(!busy, "idle after event");
    end
    check(trig_dropped == 1, $sformatf("dropped triggers %0d", trig_dropped));
    check(perr_count == 0, "no parity errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
