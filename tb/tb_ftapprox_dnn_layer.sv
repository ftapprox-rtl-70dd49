// tb_ftapprox_dnn_layer: a fully connected layer of 784 inputs and 100
// neurons (the hidden layer of an MNIST classifier) computed through the
// FTApprox unit, once without soft errors and once at each of two soft-error
// rates:
//   E1: 1% of operands with one flipped bit, 0.01% with two;
//   E2: 2% of operands with one flipped bit, 0.04% with two.
// Every neuron is a chain of multiplications (pixel x weight) and additions
// into an accumulator word held by the testbench. Operands are stored
// through the store path, upset at the given rate, then loaded. When the
// unit raises err_detect the operands are reloaded clean and the operation
// is repeated, which is the recovery the format relies on. Every operation is
// checked against the integer reference, and each neuron's result under
// errors must equal its error-free result unless an undetected double flip
// hit one of its operands. Inputs are unsigned: pixels 0..255 and weights
// 0..4095, so no dot product exceeds 32 bits.
module tb_ftapprox_dnn_layer;
  import ftapprox_pkg::*;
  import ftapprox_ref_pkg::*;

  localparam int N_IN  = 784;
  localparam int N_HID = 100;

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
  int n_ops = 0, n_reload = 0, n_corrected = 0, n_silent = 0, n_silent_neurons = 0;

  logic [7:0]  pixel  [N_IN];
  logic [11:0] weight [N_HID][N_IN];
  logic [15:0] clean_out [N_HID];

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
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic store_word(input logic [31:0] v, output logic [15:0] w);
    st_value = v;
    #1;
    w = st_word;
  endtask

  // Upset a stored word: p1 and p2 are the one- and two-flip rates in units
  // of 0.01%.
  function automatic logic [15:0] upset(input logic [15:0] w, input int p1, input int p2);
    int r, i, j;
    r = $urandom % 10000;
    if (r < p2) begin
      i = $urandom % 16;
      j = (i + 1 + $urandom % 15) % 16;
      w[i] = ~w[i]; w[j] = ~w[j];
    end else if (r < p2 + p1) begin
      i = $urandom % 16;
      w[i] = ~w[i];
    end
    return w;
  endfunction

  // One operation through the unit; checks the result against the
  // reference computed from what was actually loaded.
  task automatic run_op(input logic [15:0] a, input logic [15:0] b,
                        input logic [15:0] a_ok, input logic [15:0] b_ok,
                        input op_e o, output logic [15:0] res, output logic err);
    logic [15:0] da, db;
    logic        pe_a, pe_b, un_a, un_b, exp_err;
    longint unsigned r;
    @(negedge clk);
    ld_a = a; ld_b = b; op = o; in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    n_ops++;
    da = a ^ a_ok; db = b ^ b_ok;
    pe_a = ^da[15] ^ ^da[7:0];
    pe_b = ^db[15] ^ ^db[7:0];
    un_a = $countones(da[14:8]) == 2;
    un_b = $countones(db[14:8]) == 2;
    exp_err = pe_a | pe_b | un_a | un_b;
    checks++;
    if (!out_valid || err_detect != exp_err) begin
      failures++;
      $display("FAIL flags a=%04h/%04h b=%04h/%04h err=%0d", a, a_ok, b, b_ok, err_detect);
    end
    if (!exp_err) begin
      r = (o == OP_ADD) ? ref_add(a[7:0], int'(a_ok[14:12]), b[7:0], int'(b_ok[14:12]))
                        : ref_mul(a[7:0], int'(a_ok[14:12]), b[7:0], int'(b_ok[14:12]));
      checks++;
      if (res_word !== ref_encode(r)) begin
        failures++;
        $display("FAIL op=%0d a=%04h b=%04h res=%04h exp=%04h", o, a, b, res_word, ref_encode(r));
      end
      if (da[7:0] != 0 || db[7:0] != 0) n_silent++;
      if (corrected != 0) n_corrected++;
    end
    res = res_word;
    err = err_detect;
  endtask

  // One neuron: returns the final accumulator word and whether an undetected
  // corruption reached it.
  task automatic neuron(input int j, input int p1, input int p2,
                        output logic [15:0] acc, output logic hit);
    logic [15:0] wx, ww, lx, lw, prod, lacc, nacc;
    logic        err;
    int          silent_before;
    silent_before = n_silent;
    store_word(32'd0, acc);
    for (int i = 0; i < N_IN; i++) begin
      store_word(32'(pixel[i]), wx);
      store_word(32'(weight[j][i]), ww);
      lx = upset(wx, p1, p2);
      lw = upset(ww, p1, p2);
      run_op(lx, lw, wx, ww, OP_MUL, prod, err);
      if (err) begin
        n_reload++;
        run_op(wx, ww, wx, ww, OP_MUL, prod, err);
      end
      lacc = upset(acc, p1, p2);
      run_op(lacc, prod, acc, prod, OP_ADD, nacc, err);
      if (err) begin
        n_reload++;
        run_op(acc, prod, acc, prod, OP_ADD, nacc, err);
      end
      acc = nacc;
    end
    hit = (n_silent != silent_before);
  endtask

  initial begin
    logic [15:0] acc;
    logic        hit;
    longint unsigned exact;
    real rel_sum;
    rst_n = 1'b0; in_valid = 1'b0; ld_a = '0; ld_b = '0; op = OP_ADD; st_value = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N_IN; i++) pixel[i] = 8'($urandom);
    for (int j = 0; j < N_HID; j++)
      for (int i = 0; i < N_IN; i++) weight[j][i] = 12'($urandom);

    rel_sum = 0.0;
    for (int j = 0; j < N_HID; j++) begin
      neuron(j, 0, 0, clean_out[j], hit);
      exact = 0;
      for (int i = 0; i < N_IN; i++) exact += longint'(pixel[i]) * longint'(weight[j][i]);
      rel_sum += ($itor(ref_value(clean_out[j][7:0], int'(clean_out[j][14:12]))) - $itor(exact))
                 / $itor(exact);
    end
    $display("no soft error: %0d operations, mean relative error of the layer %f%%",
             n_ops, 100.0 * rel_sum / N_HID);

    for (int rate = 1; rate <= 2; rate++) begin
      int p1, p2, mism;
      p1 = (rate == 1) ? 100 : 200;
      p2 = (rate == 1) ? 1 : 4;
      n_ops = 0; n_reload = 0; n_corrected = 0; n_silent = 0; n_silent_neurons = 0; mism = 0;
      for (int j = 0; j < N_HID; j++) begin
        neuron(j, p1, p2, acc, hit);
        if (hit) n_silent_neurons++;
        if (acc != clean_out[j]) begin
          mism++;
          checks++;
          if (!hit) begin
            failures++;
            $display("FAIL E%0d neuron %0d differs from the error-free run", rate, j);
          end
        end
      end
      $display("E%0d: %0d operations, %0d reloads, %0d with a corrected control signal, %0d silent, %0d neurons differ",
               rate, n_ops, n_reload, n_corrected, n_silent, mism);
      checks++;
      if (n_reload == 0 || n_corrected == 0) begin
        failures++; $display("FAIL E%0d: no detection or no correction happened", rate);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
