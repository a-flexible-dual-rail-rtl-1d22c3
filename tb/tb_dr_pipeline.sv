// tb_dr_pipeline: a sender and a receiver run the 4-phase dual-rail
// handshake on the two ends of a 3-stage, 3-bit pipeline with random delays.
// Every word must arrive once, in order; the receiver stalls at times so the
// pipeline fills, and the test checks that it then holds no more than one
// word per two stages and that no stage ever shows a (1,1) rail pair.
module tb_dr_pipeline;
  int checks = 0, failures = 0;
  `include "tb_watchdog.svh"

  localparam int STAGES = 3, W = 3, NWORDS = 300;
  logic rst, in_ack, out_ack;
  logic [W-1:0] in_t, in_f, out_t, out_f;
  logic [W-1:0] sent [$];
  int n_recv = 0, n_full = 0, n_stall = 0;

  dr_pipeline #(.STAGES(STAGES), .W(W)) dut (.*);

  // no rail pair ever (1,1); count the distinct words held in the stages
  // (neighbouring valid stages hold copies of the same word)
  always @(dut.d_t or dut.d_f) begin
    int held;
    logic prev_valid, v;
    held = 0;
    prev_valid = 1'b0;
    for (int k = 1; k <= STAGES; k++) begin
      if ((dut.d_t[k] & dut.d_f[k]) != '0) begin checks++; failures++; $display("FAIL: (1,1) in stage %0d", k); end
      v = (dut.d_t[k] ^ dut.d_f[k]) == '1;
      if (v && !prev_valid) held++;
      prev_valid = v;
    end
    if (held > (STAGES + 1) / 2) begin checks++; failures++; $display("FAIL: %0d words held", held); end
    if (held == (STAGES + 1) / 2) n_full++;
  end

  initial begin : sender
    rst = 1'b1; in_t = '0; in_f = '0;
    #3 rst = 1'b0;
    for (int i = 0; i < NWORDS; i++) begin
      logic [W-1:0] v;
      v = W'($urandom);
      wait (!in_ack);
      #($urandom_range(0, 2));
      in_t = v; in_f = ~v;
      sent.push_back(v);
      wait (in_ack);
      #($urandom_range(0, 2));
      in_t = '0; in_f = '0;
    end
  end

  initial begin : receiver
    out_ack = 1'b0;
    #3;
    while (n_recv < NWORDS) begin
      logic [W-1:0] e;
      wait ((out_t ^ out_f) == '1);
      if (($urandom_range(0, 3)) == 0) begin n_stall++; #($urandom_range(5, 12)); end
      e = sent.pop_front();
      check(out_t == e, $sformatf("word %0d: got %0d exp %0d", n_recv, out_t, e));
      n_recv++;
      #($urandom_range(0, 2));
      out_ack = 1'b1;
      wait ((out_t | out_f) == '0);
      #($urandom_range(0, 2));
      out_ack = 1'b0;
    end
    check(n_stall > 0 && n_full > 0, "receiver never stalled / pipeline never full");
    $display("words=%0d stalls=%0d full=%0d", n_recv, n_stall, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
