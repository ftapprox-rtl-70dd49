// tb_ftapprox_top: end-to-end test of the FTApprox unit at its only size.
//
// Random 32-bit numbers are converted through the store path into a small
// testbench-side storage array; bits of stored words are flipped the way
// soft errors would flip them; pairs are then loaded and added or multiplied,
// back to back with random idle cycles. Each result is checked one cycle
// after its operands (the unit's latency) against the integer reference, and
// so are the expanded 32-bit value and all flags. The run counts how often
// each mechanism occurred and fails if one never did: addition, carry into a
// new block, multiplication, overflow saturation, MSVB-0 results, OR
// truncation in the encoder, control correction, control-tie detection,
// parity detection and an unseen double data flip.
module tb_ftapprox_top;
  import ftapprox_pkg::*;
  import ftapprox_ref_pkg::*;

  localparam int N_OPS   = 30000;
  localparam int N_STORE = 16;

  logic        clk = 1'b0;
  logic        rst_n;
  logic [31:0] st_value;
  ftapprox_t   st_word;
  logic        in_valid;
  ftapprox_t   ld_a, ld_b;
  op_e         op;
  logic        out_valid;
  ftapprox_t   res_word;
  logic [31:0] res_value;
  logic        err_detect, overflow;
  logic [1:0]  parity_err, uncorrectable, corrected;

  int checks = 0, failures = 0;
  int n_add = 0, n_carry = 0, n_mul = 0, n_ovf = 0, n_msvb0 = 0, n_round = 0;
  int n_corr = 0, n_tie = 0, n_par = 0, n_unseen = 0, n_idle = 0;

  typedef struct {
    logic [15:0] word;
    logic        err;
    logic [1:0]  pe, un, co;
    logic        ovf;
  } exp_t;
  exp_t exp_q[$];

  logic [15:0] store [N_STORE];
  int          flips [N_STORE];   // fault kind injected into each entry
  int          msvb0 [N_STORE];   // MSVB of each entry as stored

  always #5 clk = ~clk;

  ftapprox_top dut (
    .clk(clk), .rst_n(rst_n),
    .st_value(st_value), .st_word(st_word),
    .in_valid(in_valid), .ld_a(ld_a), .ld_b(ld_b), .op(op),
    .out_valid(out_valid), .res_word(res_word), .res_value(res_value),
    .err_detect(err_detect), .parity_err(parity_err),
    .uncorrectable(uncorrectable), .corrected(corrected), .overflow(overflow)
  );

  initial begin
    repeat (4 * N_OPS + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output checker: every out_valid must pop the result expected from the
  // operands presented in the previous cycle.
  always @(posedge clk) begin
    if (rst_n) begin
      #1;
      if (out_valid) begin
        exp_t e;
        checks++;
        if (exp_q.size() == 0) begin
          failures++; $display("FAIL result without operation");
        end else begin
          e = exp_q.pop_front();
          if (err_detect != e.err || parity_err != e.pe || uncorrectable != e.un ||
              corrected != e.co) begin
            failures++;
            $display("FAIL flags err=%0d pe=%b un=%b co=%b exp %0d %b %b %b",
                     err_detect, parity_err, uncorrectable, corrected, e.err, e.pe, e.un, e.co);
          end else if (!e.err) begin
            checks++;
            if (res_word !== e.word || overflow != e.ovf ||
                64'(res_value) != ref_value(res_word.data, int'(res_word.ctrl[6:4]))) begin
              failures++;
              $display("FAIL res=%04h exp=%04h value=%08h", res_word, e.word, res_value);
            end
          end
        end
      end else if (exp_q.size() != 0) begin
        failures++; $display("FAIL result missing one cycle after the operation");
        void'(exp_q.pop_front());
      end
    end
  end

  // Store a number through the store path, checking the conversion.
  task automatic store_value(input int idx, input logic [31:0] v);
    int sh;
    st_value = v;
    #1;
    checks++;
    if (st_word !== ref_encode(64'(v))) begin
      failures++; $display("FAIL store %08h -> %04h exp %04h", v, st_word, ref_encode(64'(v)));
    end
    sh = 4 * ref_pos(int'(st_word.ctrl[6:4]));
    if (sh > 0 && v[sh-1] && !v[sh]) n_round++;
    store[idx] = st_word;
    flips[idx] = 0;
    msvb0[idx] = int'(st_word.ctrl[6:4]);
  endtask

  // Soft errors in storage: 1 one control flip, 2 two control flips,
  // 3 one data flip, 4 parity flip, 5 two data flips.
  task automatic upset(input int idx, input int kind);
    int i, j;
    i = $urandom % 7;
    j = (i + 1 + $urandom % 6) % 7;
    case (kind)
      1: store[idx][8+i] = ~store[idx][8+i];
      2: begin store[idx][8+i] = ~store[idx][8+i]; store[idx][8+j] = ~store[idx][8+j]; end
      3: store[idx][i] = ~store[idx][i];
      4: store[idx][15] = ~store[idx][15];
      5: begin
        i = $urandom % 8; j = (i + 1 + $urandom % 7) % 8;
        store[idx][i] = ~store[idx][i]; store[idx][j] = ~store[idx][j];
      end
      default: ;
    endcase
    flips[idx] = kind;
  endtask

  function automatic logic [31:0] pick_value();
    case ($urandom % 8)
      0: return 32'($urandom % 16);           // MSVB 0
      1: return 32'hFFFF_0000 | $urandom;     // large, provokes carries and overflow
      default: return rand_value();
    endcase
  endfunction

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; ld_a = '0; ld_b = '0; op = OP_ADD; st_value = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < N_STORE; s++) store_value(s, pick_value());

    for (int n = 0; n < N_OPS; n++) begin
      int ia, ib, ka, kb, ea, eb, p_big;
      exp_t e;
      longint unsigned r;
      @(negedge clk);
      // refresh two entries, as a reload or new data would
      store_value($urandom % N_STORE, pick_value());
      if ($urandom % 4 == 0) begin
        int u;
        u = $urandom % N_STORE;
        store_value(u, pick_value());
        upset(u, 1 + $urandom % 5);
      end
      if ($urandom % 5 == 0) begin
        in_valid = 1'b0;
        n_idle++;
        continue;
      end
      ia = $urandom % N_STORE;
      ib = $urandom % N_STORE;
      if (ib == ia) ib = (ia + 1) % N_STORE;
      ld_a = store[ia];
      ld_b = store[ib];
      op   = op_e'($urandom % 2);
      in_valid = 1'b1;
      ka = flips[ia]; kb = flips[ib];
      e.pe  = {kb inside {3, 4}, ka inside {3, 4}};
      e.un  = {kb == 2, ka == 2};
      e.co  = {kb == 1, ka == 1};
      e.err = (e.pe != 0) || (e.un != 0);
      // MSVB orders as stored (control flips are repaired); data as loaded
      ea = msvb0[ia]; eb = msvb0[ib];
      r = (op == OP_ADD) ? ref_add(ld_a.data, ea, ld_b.data, eb)
                         : ref_mul(ld_a.data, ea, ld_b.data, eb);
      e.word = ref_encode(r);
      e.ovf  = (r >= 64'h1_0000_0000);
      exp_q.push_back(e);
      if (e.co != 0) n_corr++;
      if (e.un != 0) n_tie++;
      if (e.pe != 0) n_par++;
      if (!e.err) begin
        if (ka == 5 || kb == 5) n_unseen++;
        if (op == OP_ADD) begin
          n_add++;
          p_big = (ea > eb) ? ea : eb;
          if (!e.ovf && int'(e.word[14:12]) > p_big && p_big > 0) n_carry++;
        end else n_mul++;
        if (e.ovf) n_ovf++;
        if (r != 0 && e.word[14:12] == 3'd0) n_msvb0++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (3) @(posedge clk);
    #2;

    $display("add=%0d carry=%0d mul=%0d overflow=%0d msvb0=%0d or_trunc=%0d",
             n_add, n_carry, n_mul, n_ovf, n_msvb0, n_round);
    $display("ctrl_corrected=%0d ctrl_tie=%0d parity_detect=%0d unseen_double=%0d idle=%0d",
             n_corr, n_tie, n_par, n_unseen, n_idle);
    checks++;
    if (n_add == 0 || n_carry == 0 || n_mul == 0 || n_ovf == 0 || n_msvb0 == 0 ||
        n_round == 0 || n_corr == 0 || n_tie == 0 || n_par == 0 || n_unseen == 0 ||
        n_idle == 0) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
    checks++;
    if (exp_q.size() != 0) begin
      failures++; $display("FAIL %0d results never came out", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
