// Testbench of packet_completer: a model field source changes the field
// values on every fld_restart/fld_next pulse; every frame received is
// compared byte for byte with a frame built here from the same values
// (IPv4 with pattern payload, IPv6 with random payload, length clamping),
// the IPv4 header checksum is verified, the packet count and done are
// checked, and with tx_ready held high frames must follow back to back.
`timescale 1ns/1ps
`include "tb_check.svh"
module tb_packet_completer;
  import pg_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, en = 0, ipv6 = 0, payload_random = 0;
  logic [31:0] pattern = 32'hA1B2C3D4, pkt_count = 0;
  logic [47:0] dst_mac = 48'h0011_2233_4455, src_mac = 48'h66_77_88_99_AA_BB;
  field_val_t values [NUM_FIELDS];
  logic fld_restart, fld_next, tx_valid, done;
  logic tx_ready = 1;
  fl_beat_t tx;
  logic [31:0] sent;

  packet_completer dut (.clk, .rst, .en, .ipv6, .payload_random, .pattern, .dst_mac,
                        .src_mac, .pkt_count, .values, .fld_restart, .fld_next,
                        .tx, .tx_valid, .tx_ready, .done, .sent);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog"); `TB_FINISH
  end

  // field source model: values for packet number k
  int k = 0, restarts = 0;
  function automatic void set_values(int n);
    values[F_LEN]   = field_val_t'((n == 2) ? 3 : (n == 3) ? 4000 : 40 + 77 * n);
    values[F_TC]    = field_val_t'(8'h10 + n);
    values[F_ID]    = field_val_t'(16'h1000 + 3 * n);
    values[F_FRAG]  = field_val_t'(16'h4000);
    values[F_FLOW]  = field_val_t'(20'hABCDE + n);
    values[F_TTL]   = field_val_t'(8'd64);
    values[F_PROTO] = field_val_t'(8'd17);
    values[F_SRC]   = {32'h2001_0DB8, 64'h0, 32'hC0A8_0001 + n};
    values[F_DST]   = {32'hFE80_0000, 64'h1, 32'h0A00_0001 + 2 * n};
  endfunction
  always @(posedge clk) begin
    if (rst) ;
    else if (fld_restart) begin k <= 0; restarts++; set_values(0); end
    else if (fld_next) begin k <= k + 1; set_values(k + 1); end
  end

  typedef byte unsigned bq_t [$];
  function automatic bq_t expected(int n, bit v6);
    bq_t b;
    int plen, sum;
    field_val_t src, dst;
    src = {32'h2001_0DB8, 64'h0, 32'hC0A8_0001 + n};
    dst = {32'hFE80_0000, 64'h1, 32'h0A00_0001 + 2 * n};
    plen = (n == 2) ? 3 : (n == 3) ? 4000 : 40 + 77 * n;
    if (v6) plen = (plen < 6) ? 6 : (plen > 1460) ? 1460 : plen;
    else    plen = (plen < 26) ? 26 : (plen > 1480) ? 1480 : plen;
    for (int i = 5; i >= 0; i--) b.push_back(dst_mac[8*i +: 8]);
    for (int i = 5; i >= 0; i--) b.push_back(src_mac[8*i +: 8]);
    if (!v6) begin
      b.push_back(8'h08); b.push_back(8'h00);
      b.push_back(8'h45); b.push_back(8'h10 + n);
      b.push_back(8'((plen + 20) >> 8)); b.push_back(8'(plen + 20));
      b.push_back(8'((16'h1000 + 3 * n) >> 8)); b.push_back(8'(16'h1000 + 3 * n));
      b.push_back(8'h40); b.push_back(8'h00); b.push_back(8'd64); b.push_back(8'd17);
      b.push_back(8'h00); b.push_back(8'h00);       // checksum, verified separately
      for (int i = 3; i >= 0; i--) b.push_back(src[8*i +: 8]);
      for (int i = 3; i >= 0; i--) b.push_back(dst[8*i +: 8]);
    end else begin
      b.push_back(8'h86); b.push_back(8'hDD);
      b.push_back({4'h6, 4'h1}); b.push_back({4'(n), 4'hA});
      b.push_back(8'((20'hABCDE + n) >> 8)); b.push_back(8'(20'hABCDE + n));
      b.push_back(8'(plen >> 8)); b.push_back(8'(plen));
      b.push_back(8'd17); b.push_back(8'd64);
      for (int i = 15; i >= 0; i--) b.push_back(src[8*i +: 8]);
      for (int i = 15; i >= 0; i--) b.push_back(dst[8*i +: 8]);
    end
    for (int i = 0; i < plen; i++) b.push_back(pattern[8*(3 - i % 4) +: 8]);
    return b;
  endfunction

  // frame collector
  bq_t got;
  bq_t frames [$];
  int  sof_cyc [$], eof_cyc [$];
  int  cyc = 0;
  always @(posedge clk) cyc++;
  always @(posedge clk) if (tx_valid && tx_ready) begin
    if (tx.sof) begin got = {}; sof_cyc.push_back(cyc); end
    for (int i = 0; i < 8; i++) if (!tx.eof || i <= tx.rem) got.push_back(tx.data[8*i +: 8]);
    if (tx.eof) begin frames.push_back(got); eof_cyc.push_back(cyc); end
  end

  task automatic run(int count, bit v6, bit rnd, bit stall);
    bq_t e;
    int beats;
    frames = {}; sof_cyc = {}; eof_cyc = {};
    ipv6 = v6; payload_random = rnd; pkt_count = count;
    en <= 1;
    fork
      while (stall && !done) begin tx_ready <= ($urandom % 3 != 0); @(posedge clk); end
    join_none
    wait (done); @(posedge clk);
    tx_ready <= 1;
    `CHECK(frames.size() == count, $sformatf("frame count %0d", frames.size()))
    `CHECK(sent == count, "sent counter")
    beats = 0;
    for (int n = 0; n < frames.size(); n++) begin
      int mism = 0;
      e = expected(n, v6);
      beats += (e.size() + 7) / 8;
      `CHECK(frames[n].size() == e.size(),
             $sformatf("frame %0d length %0d expected %0d", n, frames[n].size(), e.size()))
      for (int i = 0; i < e.size() && i < frames[n].size(); i++) begin
        if (!v6 && (i == 24 || i == 25)) continue;
        if (i >= (v6 ? 54 : 34) && rnd) continue;
        if (frames[n][i] != e[i]) mism++;
      end
      `CHECK(mism == 0, $sformatf("frame %0d: %0d bytes differ", n, mism))
      if (!v6) begin
        int sum = 0;
        for (int i = 14; i < 34; i += 2) sum += {frames[n][i], frames[n][i+1]};
        while (sum > 16'hFFFF) sum = (sum & 16'hFFFF) + (sum >> 16);
        `CHECK(sum == 16'hFFFF, $sformatf("IPv4 checksum of frame %0d: %h", n, sum))
      end
      if (rnd) begin
        int same = 0;
        for (int i = 54; i < e.size(); i++) if (frames[n][i] == e[i]) same++;
        `CHECK(same < (e.size() - 54) / 4, "random payload is not the pattern")
      end
    end
    if (!stall)
      `CHECK(eof_cyc[count-1] - sof_cyc[0] + 1 == beats,
             $sformatf("back to back: %0d cycles for %0d beats",
                       eof_cyc[count-1] - sof_cyc[0] + 1, beats))
    en <= 0; @(posedge clk); @(posedge clk);
    `CHECK(!done, "done falls with en")
  endtask

  initial begin
    repeat (3) @(posedge clk); rst <= 0; @(posedge clk);
    run(6, 0, 0, 0);
    run(6, 1, 0, 1);
    run(5, 1, 1, 0);
    run(5, 0, 0, 1);
    `CHECK(restarts == 4, "one restart per run")
    // en dropped in the middle of a frame: frame still completes
    pkt_count = 0; ipv6 = 0; frames = {};
    en <= 1; repeat (12) @(posedge clk); en <= 0;
    repeat (400) @(posedge clk);
    `CHECK(!tx_valid && frames.size() >= 1 && frames[frames.size()-1].size() ==
           expected(frames.size()-1, 0).size(), "stop finishes current frame")
    `TB_FINISH
  end
endmodule
