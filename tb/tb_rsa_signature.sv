// tb_rsa_signature: the digital-signature application on the full core at its
// default size.
//
// The reader reads values from the card (the count and CAM word 31), then sends
// an Authenticate message carrying the count it read. The message reaches the
// processor through the control interface's mailbox and interrupts it. The
// processor reads CAM word 31 itself and hashes three words into one byte by
// XOR-ing all their bytes: the count the reader read, CAM word 31 and the first
// 32-bit word of the TEA key. It signs the hash with the current RSA private key
// and answers with {16-bit public modulus, 16-bit signature}, which the card sends
// back encrypted under TEA. The reader computes the same hash and checks that
// signature^e mod n equals it. Four key pairs are held by the processor. A timing
// key in CAM row 5 makes it switch to the next pair every ROT_PERIOD CAS steps,
// through the same match interrupt as the TEA key update.
//
// The testbench plays the processor (its routines are modelled in SystemVerilog)
// and the reader, which uses the reference TEA model. The checks cover:
//   - each signature verifies, and the pair in use matches the number of switches;
//   - all four pairs get used, and the order wraps around;
//   - a changed CAM word 31 changes the hash;
//   - a reply that has been tampered with fails verification.
// RSA sizes are tiny: 8-bit hash, 16-bit moduli and public exponent 65537. This
// follows the sizes given for the application; the primes are this testbench's
// own choice.
module tb_rsa_signature;
  import sc_pkg::*;
  import tea_ref_pkg::*;

  localparam int STEP = 256;
  localparam int ROT_PERIOD = 12;          // CAS steps between key-pair switches
  localparam int ROT_ROW = 5, ID_ROW = 31;
  localparam logic [7:0] MSG_AUTH = 8'h01;
  localparam longint E_PUB = 65537;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        rx_valid, tx_valid, tx_ready, mcu_wr, mcu_rd, mcu_irq, pas_clk, overrun;
  logic [7:0]  rx_data, tx_data, mcu_wdata, mcu_rdata;
  logic [2:0]  mcu_addr;

  smart_card_top u_dut (.clk, .rst_n, .rx_valid, .rx_data, .tx_valid, .tx_data, .tx_ready,
    .mcu_addr, .mcu_wdata, .mcu_wr, .mcu_rd, .mcu_rdata, .mcu_irq, .pas_clk,
    .seu_cnt_main(32'h0), .seu_cnt_red(32'h0), .seu_cam_en(1'b0), .seu_cam_row(5'h0),
    .seu_cam_bit(6'h0), .overrun);

  int checks = 0, failures = 0;
  int n_auth = 0, n_rot = 0;
  logic [3:0] pairs_used = '0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- RSA arithmetic ----------------
  longint p_tab [4] = '{251, 239, 229, 223};
  longint q_tab [4] = '{241, 233, 227, 211};
  longint n_tab [4], d_tab [4];

  function automatic longint modexp(input longint b, input longint e, input longint m);
    longint r = 1;
    b = b % m;
    while (e > 0) begin
      if (e[0]) r = (r * b) % m;
      b = (b * b) % m;
      e = e >> 1;
    end
    return r;
  endfunction

  function automatic longint modinv(input longint a, input longint m);
    longint t = 0, nt = 1, r = m, nr = a % m, qq, tmp;
    while (nr != 0) begin
      qq = r / nr;
      tmp = t - qq * nt; t = nt; nt = tmp;
      tmp = r - qq * nr; r = nr; nr = tmp;
    end
    return (t < 0) ? t + m : t;
  endfunction

  function automatic logic [7:0] hash8(input logic [31:0] a, b, c);
    logic [31:0] x = a ^ b ^ c;
    return x[31:24] ^ x[23:16] ^ x[15:8] ^ x[7:0];
  endfunction

  // ---------------- processor side ----------------
  logic [127:0] key = 128'h0F1E_2D3C_4B5A_6978_8796_A5B4_C3D2_E1F0;  // shared TEA key
  int           pair = 0;                                             // pair in use
  event         setup_done;

  task automatic bus_wr(input logic [2:0] a, input logic [7:0] d);
    @(negedge clk); mcu_addr = a; mcu_wdata = d; mcu_wr = 1;
    @(negedge clk); mcu_wr = 0;
  endtask

  task automatic bus_rd(input logic [2:0] a, output logic [7:0] d);
    @(negedge clk); mcu_addr = a; mcu_rd = 1; #1; d = mcu_rdata;
    @(negedge clk); mcu_rd = 0;
  endtask

  task automatic mcu_cmd(input op_e op, input logic [7:0] arg, input logic [31:0] d, output logic [31:0] r);
    logic [7:0] b;
    bus_wr(1, arg);
    for (int i = 0; i < 4; i++) bus_wr(3'(2 + i), d[8*i +: 8]);
    bus_wr(0, op);
    do bus_rd(6, b); while (b[7]);
    check(b[2:0] == 0, $sformatf("status of opcode %h: %h", op, b[2:0]));
    for (int i = 0; i < 4; i++) begin bus_rd(3'(2 + i), b); r[8*i +: 8] = b; end
  endtask

  // Authenticate: hash the reader's count, CAM word 31 and key word 0, then sign.
  task automatic auth_isr();
    logic [31:0] arg, cnt, id, r;
    logic [7:0]  h;
    longint      sig;
    mcu_cmd(OP_MSG_READ, 8'h01, 0, arg);
    mcu_cmd(OP_MSG_READ, 8'h80, 0, cnt);
    check(arg == 32'(MSG_AUTH), $sformatf("message type %h", arg));
    mcu_cmd(OP_CAM_READ, 8'(ID_ROW), 0, id);
    h   = hash8(cnt, id, key[31:0]);
    sig = modexp(longint'(h), d_tab[pair], n_tab[pair]);
    mcu_cmd(OP_TO_READER, 0, {n_tab[pair][15:0], sig[15:0]}, r);
    pairs_used[pair] = 1'b1;
  endtask

  // Timing key of the key-pair switch.
  task automatic rotate_isr();
    logic [31:0] m, now, r;
    mcu_cmd(OP_MATCH_READ, 0, 0, m);
    check(m[ROT_ROW], $sformatf("key-switch row matched: %h", m));
    mcu_cmd(OP_CNT_READ, 0, 0, now);
    pair = (pair + 1) % 4;
    n_rot++;
    mcu_cmd(OP_CAM_WRITE, 8'h80 | 8'(ROT_ROW), now + ROT_PERIOD, r);
    bus_wr(7, 8'h02);
  endtask

  initial begin : processor
    logic [31:0] r, now;
    logic [7:0]  b;
    @(posedge rst_n);
    for (int i = 0; i < 4; i++) mcu_cmd(OP_KEY_WRITE, 8'(i), key[32*i +: 32], r);
    mcu_cmd(OP_CAM_WRITE, 8'(ID_ROW), 32'hC0DE_0031, r);     // stored word, never matched
    mcu_cmd(OP_CNT_READ, 0, 0, now);
    mcu_cmd(OP_CAM_WRITE, 8'h80 | 8'(ROT_ROW), now + ROT_PERIOD, r);
    -> setup_done;
    forever begin
      @(negedge clk);
      if (mcu_irq) begin
        bus_rd(7, b);
        if (b[2]) auth_isr();
        if (b[1]) rotate_isr();
      end
    end
  end

  // ---------------- reader side ----------------
  task automatic send_blk(input logic [63:0] p);
    logic [63:0] c = tea_enc(p, key);
    for (int i = 7; i >= 0; i--) begin
      @(negedge clk); rx_valid = 1; rx_data = c[8*i +: 8];
    end
    @(negedge clk); rx_valid = 0;
  endtask

  task automatic recv_blk(output logic [63:0] p);
    logic [63:0] got = 0;
    for (int i = 0; i < 8; i++) begin
      while (!tx_valid) @(negedge clk);
      got = {got[55:0], tx_data};
      tx_ready = 1; @(negedge clk); tx_ready = 0;
    end
    p = tea_dec(got, key);
  endtask

  task automatic reader_cmd(input op_e op, input logic [7:0] arg, input logic [31:0] d, output logic [31:0] r);
    logic [63:0] rep;
    send_blk({op, arg, 16'h0, d});
    recv_blk(rep);
    check(rep[63:56] == op && rep[55:48] == 0, $sformatf("reply %h", rep[63:48]));
    r = rep[31:0];
  endtask

  // One authentication; returns the pair index the signature verified with (-1 if none).
  task automatic authenticate(output int used, output logic [31:0] ans, output logic [7:0] h,
                              output logic [31:0] cnt);
    logic [31:0] id;
    logic [63:0] rep;
    reader_cmd(OP_CNT_READ, 0, 0, cnt);
    reader_cmd(OP_CAM_READ, 8'(ID_ROW), 0, id);
    h = hash8(cnt, id, key[31:0]);
    send_blk({OP_TO_MCU, MSG_AUTH, 16'h0, cnt});
    recv_blk(rep);
    check(rep[63:56] == OP_TO_READER, $sformatf("answer opcode %h", rep[63:56]));
    ans  = rep[31:0];
    used = -1;
    for (int i = 0; i < 4; i++)
      if (longint'(ans[31:16]) == n_tab[i] && modexp(longint'(ans[15:0]), E_PUB, n_tab[i]) == longint'(h))
        used = i;
    n_auth++;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : reader
    int used, rot0;
    logic [31:0] ans, r, cnt;
    logic [7:0]  h;
    for (int i = 0; i < 4; i++) begin
      n_tab[i] = p_tab[i] * q_tab[i];
      d_tab[i] = modinv(E_PUB, (p_tab[i] - 1) * (q_tab[i] - 1));
      check((E_PUB * d_tab[i]) % ((p_tab[i] - 1) * (q_tab[i] - 1)) == 1, "private exponent");
    end
    rx_valid = 0; rx_data = 0; tx_ready = 0; mcu_wr = 0; mcu_rd = 0; mcu_addr = 0; mcu_wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(setup_done);
    // Authenticate across six key-pair switches.
    for (int k = 0; k < 7; k++) begin
      while (n_rot != k) @(negedge clk);
      rot0 = n_rot;
      authenticate(used, ans, h, cnt);
      check(used >= 0, $sformatf("signature %h verifies", ans));
      check(n_rot != rot0 || used == rot0 % 4,
            $sformatf("pair %0d in use after %0d switches", used, rot0));
    end
    check(pairs_used == 4'hF, $sformatf("all four pairs used: %b", pairs_used));
    check(n_rot >= 6, "pairs switched by the timing key");
    // A changed CAM word 31 changes the hash (its low byte differs by 1), and the
    // card signs the new hash.
    reader_cmd(OP_CAM_WRITE, 8'(ID_ROW), 32'hC0DE_0131, r);
    authenticate(used, ans, h, cnt);
    check(used >= 0, "signature over the new word verifies");
    check(h != hash8(cnt, 32'hC0DE_0031, key[31:0]), "new word, new hash");
    // A tampered signature fails (RSA is a permutation modulo n).
    ans[0] = ~ans[0];
    check(modexp(longint'(ans[15:0]), E_PUB, longint'(ans[31:16])) != longint'(h),
          "tampered signature rejected");
    $display("auth=%0d switches=%0d pairs=%b", n_auth, n_rot, pairs_used);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
