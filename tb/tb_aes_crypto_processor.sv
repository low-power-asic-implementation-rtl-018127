// tb_aes_crypto_processor: end-to-end testbench for the AES-256
// crypto-processor at its default (full) size.
//
// A driver offers plaintext blocks with random keys and random gaps through
// the e_enable/e_ready handshake, first with power gating on and then off.
// Monitors check every ciphertext against the software model in aes_ref_pkg,
// and check that every decrypted block equals its plaintext. They also check
// the timing: e_valid on the 14th edge after the edge that accepts a block,
// and d_valid 15 clocks after e_valid. Back-to-back blocks are 16 clocks
// apart. For each block the decryption key {w52..w59} is put on key_d when
// its ciphertext appears.
// Each mechanism of the design is counted and must occur at least once:
// the initial AddRoundKey-only stage and the last-round MixColumns bypass in
// both blocks, encryption and decryption running at the same time,
// back-to-back encryptions, going to sleep, waking on a request, waking at
// the end of decryption, and requests held off while asleep.
module tb_aes_crypto_processor;
  import aes_ref_pkg::*;
  localparam int NBLK = 200;
  logic clk = 0, rst = 0, e_enable = 0, e_ready, pg_en = 0;
  logic e_valid, d_valid, sleep_e;
  logic [127:0] data_e, op_e, op_d;
  logic [255:0] key_e, key_d;
  int checks = 0, failures = 0;

  aes_crypto_processor dut (
    .clk(clk), .rst(rst), .e_enable(e_enable), .e_ready(e_ready), .data_e(data_e),
    .key_e(key_e), .key_d(key_d), .pg_en(pg_en), .op_e(op_e), .e_valid(e_valid),
    .op_d(op_d), .d_valid(d_valid), .sleep_e(sleep_e));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (NBLK * 80 + 500) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- scoreboards ----
  logic [255:0] q_key [$];
  logic [127:0] q_pt  [$];
  logic [127:0] q_dpt [$];
  int unsigned  q_t   [$];
  int unsigned  cyc = 0, n_enc = 0, n_dec = 0, last_evalid = 0;

  // ---- mechanism counters ----
  int m_ark_only_e = 0, m_ark_only_d = 0, m_lastbyp_e = 0, m_lastbyp_d = 0;
  int m_overlap = 0, m_b2b = 0, m_sleep = 0, m_wake_req = 0, m_wake_dec = 0, m_held = 0;
  logic sleep_q = 0, evalid_q = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) begin
      if (dut.u_enc.count[0] && dut.u_enc.load) m_ark_only_e++;
      if (dut.u_dec.count[0] && dut.u_dec.load) m_ark_only_d++;
      if (dut.u_enc.count[14] && dut.enc_clk_en) m_lastbyp_e++;
      if (dut.u_dec.count[14]) m_lastbyp_d++;
      if (!dut.u_enc.count[0] && !dut.u_enc.count[15] && !dut.u_dec.count[0] && dut.enc_clk_en)
        m_overlap++;
      if (sleep_e && !sleep_q) m_sleep++;
      if (!sleep_e && sleep_q) begin
        if (e_enable) m_wake_req++;
        else          m_wake_dec++;
      end
      if (e_enable && !e_ready && sleep_e) m_held++;
      sleep_q <= sleep_e;
    end
  end

  // ---- driver ----
  initial begin
    ref_init();
    key_d = '0;
    #1 rst = 1;                  // a rising edge, so the asynchronous reset acts at once
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < NBLK; i++) begin
      pg_en  = (i < NBLK * 2 / 3);
      data_e = rand128();
      key_e  = (i % 5 == 0) ? rand256() : key_e;
      if (i == 0) key_e = 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f;
      if (i == 0) data_e = 128'h00112233445566778899aabbccddeeff;
      e_enable = 1;
      // e_ready is registered: sample it within the cycle, before the edge
      forever begin
        bit accepted;
        accepted = e_ready;
        @(posedge clk);
        if (accepted) break;
        #1;
      end
      q_key.push_back(key_e);
      q_pt.push_back(data_e);
      q_t.push_back(cyc);
      #1 e_enable = 0;
      data_e = rand128();
      // gaps: 0 (back to back), short (request while asleep), long (wake at end of decryption)
      case ((i % 10 == 9) ? 0 : $urandom_range(0, 3))
        0: ;
        1: repeat ($urandom_range(16, 20)) @(posedge clk);
        2: repeat ($urandom_range(30, 40)) @(posedge clk);
        default: repeat ($urandom_range(1, 6)) @(posedge clk);
      endcase
      #1;
    end
    wait (n_dec == NBLK);
    repeat (5) @(posedge clk);
    check(n_enc == NBLK, "all blocks encrypted");
    check(m_ark_only_e > 0, "encryption initial AddRoundKey stage seen");
    check(m_ark_only_d > 0, "decryption initial AddRoundKey stage seen");
    check(m_lastbyp_e > 0,  "encryption last-round MixColumns bypass seen");
    check(m_lastbyp_d > 0,  "decryption last-round InvMixColumns bypass seen");
    check(m_overlap > 0,    "encryption and decryption overlapped");
    check(m_b2b > 0,        "back-to-back encryptions seen");
    check(m_sleep > 0,      "encryption block went to sleep");
    check(m_wake_req > 0,   "woken by a request");
    check(m_wake_dec > 0,   "woken at end of decryption");
    check(m_held > 0,       "request held off while asleep");
    $display("mechanisms: ark_only_e=%0d ark_only_d=%0d lastbyp_e=%0d lastbyp_d=%0d overlap=%0d b2b=%0d sleep=%0d wake_req=%0d wake_dec=%0d held=%0d",
             m_ark_only_e, m_ark_only_d, m_lastbyp_e, m_lastbyp_d, m_overlap, m_b2b,
             m_sleep, m_wake_req, m_wake_dec, m_held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- encryption monitor: also supplies key_d for the decryption start ----
  always @(posedge clk) begin
    #1;
    if (!rst && e_valid) begin
      logic [255:0] k;
      logic [127:0] pt, exp;
      int unsigned t;
      if (q_key.size() == 0) begin
        check(0, "e_valid with no block outstanding");
      end else begin
        k = q_key.pop_front();
        pt = q_pt.pop_front();
        t = q_t.pop_front();
        exp = ref_encrypt(k, pt);
        check(op_e === exp, $sformatf("ciphertext %0d: got %h exp %h", n_enc, op_e, exp));
        if (n_enc == 0) check(op_e === 128'h8ea2b7ca516745bfeafc49904b496089, "known answer");
        // t was read at the accepting edge, before the cycle count moved on
        check(cyc - t == 15, $sformatf("encryption latency %0d edges, expected 14", cyc - t - 1));
        if (n_enc > 0 && cyc - last_evalid == 16) m_b2b++;
        last_evalid = cyc;
        key_d = ref_dec_key(k);
        q_dpt.push_back(pt);
        n_enc++;
      end
    end
  end

  // ---- decryption monitor ----
  always @(posedge clk) begin
    #1;
    if (!rst && d_valid) begin
      logic [127:0] pt;
      if (q_dpt.size() == 0) check(0, "d_valid with no block outstanding");
      else begin
        pt = q_dpt.pop_front();
        check(op_d === pt, $sformatf("plaintext %0d: got %h exp %h", n_dec, op_d, pt));
        check(cyc - last_evalid == 15 || n_dec + 1 < n_enc,
              $sformatf("decryption latency %0d, expected 15", cyc - last_evalid));
        n_dec++;
      end
    end
  end
endmodule
