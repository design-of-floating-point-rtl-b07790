// tb_fpmul_vedic: end-to-end self-check of the pipelined floating-point
// multiplier at its default configuration.
//
// Operand pairs are streamed one per clock (with random idle cycles in a
// second phase). Each accepted pair is pushed into a queue together with the
// result of a reference model written here from the IEEE 754 field
// definitions (48-bit integer significand product, truncation, overflow to
// infinity, underflow and subnormal inputs to zero, quiet NaN 0x7FC00000).
// Every out_valid must come exactly three clocks after its in_valid, in
// order, with the expected value and flags. The two published examples
// (134.0625 * -2.25 = -301.640625 -> 0xC396D200 and -14.5 * -0.375 = 5.4375
// -> 0x40AE0000) are checked by value, and the intermediate signals of the
// first are compared with the published ones. The test counts how often each
// mechanism occurs (normalisation shift, no shift, overflow, underflow, NaN,
// infinity, zero operand, subnormal operand, negative result, idle cycle)
// and fails any that never occurred.
module tb_fpmul_vedic;
  import fpmul_pkg::*;

  localparam int LATENCY = 3;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        in_valid;
  logic [31:0] fp_a, fp_b;
  logic        out_valid;
  logic [31:0] fp_z;
  fp_flags_t   flags;

  int checks = 0, failures = 0;
  longint cycle = 0;

  typedef struct {
    logic [31:0] z;
    logic [4:0]  f;
    longint      t_in;
  } exp_t;
  exp_t q[$];

  typedef enum int {
    M_SHIFT, M_NOSHIFT, M_OVF, M_UNF, M_NAN, M_INF, M_ZERO, M_SUBN, M_NEG, M_IDLE, M_COUNT
  } mech_e;
  int mech[M_COUNT];
  string mech_name[M_COUNT] = '{"normalise-shift", "no-shift", "overflow", "underflow",
                                "nan", "infinity", "zero-operand", "subnormal-operand",
                                "negative-result", "idle-cycle"};

  fpmul_vedic dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .fp_a(fp_a), .fp_b(fp_b),
                   .out_valid(out_valid), .fp_z(fp_z), .flags(flags));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // Reference model; returns {flags, z} and records the mechanisms used.
  function automatic logic [36:0] ref_mul(input logic [31:0] a, input logic [31:0] b);
    logic        s;
    int          ea, eb, e;
    logic [47:0] p;
    logic [22:0] fr;
    logic        za, zb, ia, ib, na, nb;
    ea = int'(a[30:23]);
    eb = int'(b[30:23]);
    s  = a[31] ^ b[31];
    za = (ea == 0);   zb = (eb == 0);
    ia = (ea == 255) && (a[22:0] == 0);  ib = (eb == 255) && (b[22:0] == 0);
    na = (ea == 255) && (a[22:0] != 0);  nb = (eb == 255) && (b[22:0] != 0);
    if ((za && a[22:0] != 0) || (zb && b[22:0] != 0)) mech[M_SUBN]++;
    if (na || nb || (ia && zb) || (za && ib)) begin
      mech[M_NAN]++;
      return {5'b10000, 32'h7FC0_0000};
    end
    if (ia || ib) begin
      mech[M_INF]++;
      return {5'b00010, s, 8'hFF, 23'd0};
    end
    if (za || zb) begin
      mech[M_ZERO]++;
      return {5'b00001, s, 31'd0};
    end
    p = {24'd0, 1'b1, a[22:0]} * {24'd0, 1'b1, b[22:0]};
    e = ea + eb - 127;
    if (p[47]) begin
      e++;
      fr = p[46:24];
      mech[M_SHIFT]++;
    end else begin
      fr = p[45:23];
      mech[M_NOSHIFT]++;
    end
    if (e >= 255) begin
      mech[M_OVF]++;
      return {5'b01010, s, 8'hFF, 23'd0};
    end
    if (e <= 0) begin
      mech[M_UNF]++;
      return {5'b00101, s, 31'd0};
    end
    if (s) mech[M_NEG]++;
    return {5'b00000, s, 8'(e), fr};
  endfunction

  function automatic logic [31:0] rand_operand();
    logic [31:0] r;
    int k;
    r = $urandom;
    k = int'($urandom % 100);
    if (k < 3)       r[30:0] = 31'd0;                          // zero
    else if (k < 5)  r[30:0] = {8'hFF, 23'd0};                 // infinity
    else if (k < 7)  r[30:0] = {8'hFF, 23'($urandom | 1)};     // NaN
    else if (k < 9)  r[30:23] = 8'h00;                         // subnormal or zero
    else if (k < 20) r[30:23] = 8'(($urandom % 2 == 1) ? 200 + $urandom % 55 : 1 + $urandom % 50);
    else             r[30:23] = 8'(96 + $urandom % 64);        // moderate range
    return r;
  endfunction

  // Drives one operand pair for one clock; inputs change on the falling edge
  // so the rising edge samples them without a race.
  task automatic issue(input logic [31:0] a, input logic [31:0] b);
    exp_t x;
    logic [36:0] r;
    @(negedge clk);
    r      = ref_mul(a, b);
    x.z    = r[31:0];
    x.f    = r[36:32];
    x.t_in = cycle;
    q.push_back(x);
    fp_a     = a;
    fp_b     = b;
    in_valid = 1'b1;
  endtask

  task automatic idle();
    @(negedge clk);
    in_valid = 1'b0;
    fp_a     = $urandom;
    fp_b     = $urandom;
  endtask

  // Output checker: order, value, flags and latency.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t x;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected result %h", fp_z);
      end else begin
        x = q.pop_front();
        if (fp_z !== x.z || flags !== x.f) begin
          failures++;
          if (failures < 20)
            $display("FAIL cycle %0d got %h/%b expected %h/%b", cycle, fp_z, flags, x.z, x.f);
        end
        checks++;
        if (cycle - x.t_in != longint'(LATENCY)) begin
          failures++;
          if (failures < 20) $display("FAIL latency %0d", cycle - x.t_in);
        end
      end
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n    = 1'b0;
    in_valid = 1'b0;
    fp_a     = '0;
    fp_b     = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    // published case I, then inspect its intermediate signals
    issue(32'h4306_1000, 32'hC010_0000);
    idle();
    @(posedge clk);  // operands now in the capture register
    #1;
    checks++;
    if (dut.ua.exp !== 8'h86 || dut.ua.sig !== 32'h0086_1000 ||
        dut.ub.exp !== 8'h80 || dut.ub.sig !== 32'h0090_0000) begin
      failures++;
      $display("FAIL case I fields");
    end
    // one clock later the stage-2 registers hold exp_in and sig_in
    @(posedge clk);
    #1;
    checks++;
    if (dut.exp_in_q[7:0] !== 8'h87 || dut.sig_in_q !== 28'h4B6_9000 ||
        dut.exp_o !== 8'h87 || dut.sig_o !== 28'h4B6_9000) begin
      failures++;
      $display("FAIL case I intermediate exp_in=%h sig_in=%h", dut.exp_in_q, dut.sig_in_q);
    end
    @(posedge clk);
    #1;
    checks++;
    if (fp_z !== 32'hC396_D200) begin
      failures++;
      $display("FAIL case I result %h", fp_z);
    end

    // published case II
    issue(32'hC168_0000, 32'hBEC0_0000);
    idle();
    @(posedge clk);
    @(posedge clk);
    #1;
    checks++;
    if (dut.exp_in_q[7:0] !== 8'h80 || dut.sig_in_q !== 28'hAE0_0000 ||
        dut.exp_o !== 8'h81 || dut.sig_o !== 28'h570_0000) begin
      failures++;
      $display("FAIL case II intermediate");
    end
    @(posedge clk);
    #1;
    checks++;
    if (fp_z !== 32'h40AE_0000) begin
      failures++;
      $display("FAIL case II result %h", fp_z);
    end
    idle();

    // directed specials
    issue(32'h7F00_0000, 32'h7F00_0000);   // overflow
    issue(32'h0080_0000, 32'h0080_0000);   // underflow
    issue(32'h7F80_0000, 32'h0000_0000);   // inf * 0 -> NaN
    issue(32'hFF80_0000, 32'h4000_0000);   // -inf * 2
    issue(32'h8000_0000, 32'h4000_0000);   // -0 * 2
    issue(32'h0000_0001, 32'h4000_0000);   // subnormal * 2
    issue(32'h3FC0_0000, 32'h3FC0_0000);   // 1.5*1.5 -> shift

    // back-to-back random stream
    for (int n = 0; n < 20000; n++) issue(rand_operand(), rand_operand());
    // random stream with idle cycles
    for (int n = 0; n < 5000; n++) begin
      if ($urandom % 3 == 0) begin
        mech[M_IDLE]++;
        idle();
      end
      issue(rand_operand(), rand_operand());
    end
    idle();
    repeat (LATENCY + 2) @(posedge clk);

    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", q.size());
    end
    for (int m = 0; m < M_COUNT; m++) begin
      $display("mechanism %-18s occurred %0d times", mech_name[m], mech[m]);
      checks++;
      if (mech[m] == 0) begin
        failures++;
        $display("FAIL mechanism %s never occurred", mech_name[m]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
