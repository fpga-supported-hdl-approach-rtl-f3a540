// End-to-end testbench for floting_point_alu32.
//
// Drives the ALU through every select code with directed and random operand
// pairs and compares all 65 output bits with an independent model: the
// double-precision reference for the four arithmetic operations, per-bit
// truth tables for the logic operations, and zero for unused codes. It also
// counts how often each mechanism of the design was exercised (alignment
// shift, cancellation with left normalization, carry renormalization,
// round-up, overflow, underflow, divide by zero, NaN result, each operation)
// and counts a failure for any mechanism that never occurred. The ALU has no
// parameters, so this runs the design at its only size. Each check waits
// 1 ns for the combinational result.
module tb_floting_point_alu32;
  import fp_ref_pkg::*;

  localparam int N_RANDOM = 20000;

  typedef enum int {
    M_ADD, M_SUB, M_MUL, M_DIV, M_LOGIC, M_UNUSED, M_ALIGN, M_CANCEL, M_CARRY,
    M_ROUNDUP, M_OVERFLOW, M_UNDERFLOW, M_DIVZERO, M_NAN, M_COUNT
  } mech_t;
  string mech_name [M_COUNT] = '{"add", "subtract", "multiply", "divide", "logic op",
    "unused select", "alignment shift", "cancellation", "carry renormalization",
    "round up", "overflow", "underflow", "divide by zero", "NaN result"};

  logic [31:0] a, b;
  logic [3:0]  s;
  logic [64:0] out;
  int          checks = 0, failures = 0;
  int          mech [M_COUNT];

  floting_point_alu32 dut (.a, .b, .s, .out);

  function automatic logic [3:0] truth(input logic [3:0] code);
    case (code)
      4'd4:    return 4'b1000;   // AND
      4'd5:    return 4'b1110;   // OR
      4'd6:    return 4'b0111;   // NAND
      4'd7:    return 4'b0001;   // NOR
      4'd8:    return 4'b0110;   // XOR
      default: return 4'b0000;
    endcase
  endfunction

  function automatic logic is_finite_nz(input logic [31:0] x);
    return x[30:23] != 8'h00 && x[30:23] != 8'hFF;
  endfunction

  task automatic count_mechanisms(input logic [3:0] ts, input logic [31:0] ta,
                                  input logic [31:0] tb, input logic [34:0] e);
    int   ea, eb, er;
    logic eff_sub;
    real  exact, trunc;
    ea = int'(ta[30:23]); eb = int'(tb[30:23]); er = int'(e[30:23]);
    if (e[32]) mech[M_OVERFLOW]++;
    if (e[33]) mech[M_UNDERFLOW]++;
    if (e[34]) mech[M_DIVZERO]++;
    if (e[31:0] == REF_QNAN) mech[M_NAN]++;
    if (ts <= 4'd1 && is_finite_nz(ta) && is_finite_nz(tb) && e[30:23] != 0 && !e[32]) begin
      eff_sub = ta[31] ^ tb[31] ^ ts[0];
      if (ea != eb) mech[M_ALIGN]++;
      if (eff_sub && er < ((ea > eb ? ea : eb) - 1)) mech[M_CANCEL]++;
      if (!eff_sub && er > (ea > eb ? ea : eb)) mech[M_CARRY]++;
    end
    if (ts >= 4'd2 && ts <= 4'd3 && is_finite_nz(ta) && is_finite_nz(tb) &&
        e[30:23] != 0 && !e[32]) begin
      exact = (ts == 4'd2) ? sp_to_real(ta) * sp_to_real(tb) : sp_to_real(ta) / sp_to_real(tb);
      if (exact < 0.0) exact = -exact;
      trunc = sp_to_real({1'b0, e[30:0]});
      if (trunc > exact) mech[M_ROUNDUP]++;
    end
  endtask

  task automatic check(input logic [3:0] ts, input logic [31:0] ta, input logic [31:0] tb);
    logic [64:0] ev;
    logic [3:0]  t;
    a = ta; b = tb; s = ts;
    #1;
    ev = '0;
    if (ts <= 4'd3) begin
      ev[34:0] = fp_ref(int'(ts), ta, tb);
      count_mechanisms(ts, ta, tb, ev[34:0]);
      mech[mech_t'(int'(ts))]++;
    end else if (ts <= 4'd8) begin
      t = truth(ts);
      for (int k = 0; k < 32; k++) ev[k] = t[{ta[k], tb[k]}];
      mech[M_LOGIC]++;
    end else begin
      mech[M_UNUSED]++;
    end
    checks++;
    if (out !== ev) begin
      failures++;
      if (failures <= 10)
        $display("FAIL s=%0d a=%h b=%h got %h expected %h", ts, ta, tb, out, ev);
    end
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] x;
    logic [3:0]  op;
    foreach (mech[i]) mech[i] = 0;
    // directed: 2.5 + 0.75, 1 - (1 - 2^-23), 3 * 7, 1 / 3, overflow, underflow, x / 0
    check(4'd0, 32'h40200000, 32'h3F400000);
    check(4'd1, 32'h3F800000, 32'h3F7FFFFF);
    check(4'd2, 32'h40400000, 32'h40E00000);
    check(4'd3, 32'h3F800000, 32'h40400000);
    check(4'd2, 32'h7F000000, 32'h7F000000);
    check(4'd3, 32'h00800000, 32'h7F000000);
    check(4'd3, 32'hC0000000, 32'h00000000);
    check(4'd0, 32'h7FC00001, 32'h3F800000);
    for (int c = 4; c < 16; c++) check(4'(c), 32'hF0F0_1234, 32'hFF00_5678);
    for (int i = 0; i < N_RANDOM; i++) begin
      x  = rand_operand();
      op = 4'($urandom_range(0, 15));
      if (op > 4'd9) op = 4'($urandom_range(0, 3));   // favour arithmetic
      check(op, x, ($urandom_range(0, 1) == 0) ? rand_operand() : near_operand(x));
    end
    for (int i = 0; i < M_COUNT; i++) begin
      $display("mechanism %-22s %0d", mech_name[i], mech[i]);
      if (mech[i] == 0) begin
        failures++;
        $display("FAIL mechanism never exercised: %s", mech_name[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
