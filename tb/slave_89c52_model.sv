// Behavioural model of one slave microcontroller (8051 family) and its
// task firmware, for testbenches only.
//
// The model follows the firmware's pin protocol at machine-cycle
// granularity (MC_NS per machine cycle; 1.5 us is a classic 8051 at 8 MHz):
//  * idle loop: input_rdy = 1 and idle = 1, poll msg_bit once per cycle;
//  * byte read: pull oen_n low for one cycle, latch p0 (the card must be
//    driving it, p0_oe = 1), release oen_n;
//  * byte write: put the byte on p2, raise wr_req for one cycle, lower it
//    for one cycle.
// After reading a command byte the model drops input_rdy and idle and runs
// the task:
//  * 0x01 add: two bytes in, their 8 bit sum out;
//  * 0x02 multiply: two 16 bit big endian words in, 16 bit product out,
//    big endian;
//  * 0x03 pi series: m, ic high, ic low in; computes
//    s = frac(sum_{k=0}^{ic-1} (16^(ic-k) mod (8k+m)) / (8k+m)) and sends its
//    first six decimal digits, one byte each (0..9), then 8'hAA;
//  * any other code: no output.
// The pi arithmetic here is double precision with exact integer modular
// powers; the real part used 32 bit floats. ITER_NS stands in for the time
// of one series term. Counters (tasks_done, bytes_read, bytes_written,
// p0_errors) let a testbench see what the model did.
module slave_89c52_model #(
  parameter int unsigned MC_NS    = 1500,
  parameter int unsigned ADD_MC   = 9,
  parameter int unsigned ITER_NS  = 3000
) (
  input  logic [7:0] p0,
  input  logic       p0_oe,
  input  logic       msg_bit,
  output logic [7:0] p2,
  output logic       wr_req,
  output logic       oen_n,
  output logic       input_rdy,
  output logic       idle,
  output logic       led
);

  int unsigned tasks_done    = 0;
  int unsigned bytes_read    = 0;
  int unsigned bytes_written = 0;
  int unsigned p0_errors     = 0;

  task automatic mc(input int unsigned n);
    #(real'(n) * real'(MC_NS) * 1ns);
  endtask

  task automatic getbyte(output logic [7:0] b);
    while (!msg_bit) mc(1);
    oen_n = 1'b0;
    mc(1);
    if (!p0_oe) p0_errors++;
    b = p0;
    oen_n = 1'b1;
    bytes_read++;
    mc(1);
  endtask

  task automatic putbyte(input logic [7:0] b);
    p2 = b;
    wr_req = 1'b1;
    mc(1);
    wr_req = 1'b0;
    mc(1);
    bytes_written++;
  endtask

  // 16^p mod ak, left-to-right binary exponentiation as in the firmware.
  function automatic longint expm16(input longint p, input longint ak);
    longint pt, p1, r;
    if (ak == 1) return 0;
    pt = 1;
    while (pt * 2 <= p) pt = pt * 2;
    p1 = p;
    r  = 1;
    while (pt >= 1) begin
      if (p1 >= pt) begin
        r  = (16 * r) % ak;
        p1 = p1 - pt;
      end
      pt = pt / 2;
      if (pt >= 1) r = (r * r) % ak;
    end
    return r;
  endfunction

  task automatic run_pi();
    logic [7:0] m, ichi, iclo;
    int unsigned ic;
    real s, tmp;
    int  a;
    getbyte(m);
    getbyte(ichi);
    getbyte(iclo);
    ic = {ichi, iclo};
    s  = 0.0;
    for (int unsigned k = 0; k < ic; k++) begin
      longint ak, t;
      ak  = 8 * longint'(k) + longint'(m);
      led = 1'b0;
      t   = expm16(longint'(ic - k), ak);
      #(ITER_NS * 1ns);
      led = 1'b1;
      s = s + real'(t) / real'(ak);
      s = s - $floor(s);
    end
    tmp = s;
    a   = 0;
    for (int i = 0; i < 6; i++) begin
      tmp = tmp * 10.0 - real'(a) * 10.0;
      a   = int'($floor(tmp));
      putbyte(8'(a));
    end
    putbyte(8'hAA);
  endtask

  initial begin
    logic [7:0] cmd, b1, b2, b3, b4;
    logic [15:0] prod;
    p2 = 8'h00; wr_req = 1'b0; oen_n = 1'b1;
    input_rdy = 1'b1; idle = 1'b1; led = 1'b1;
    forever begin
      input_rdy = 1'b1;
      idle      = 1'b1;
      getbyte(cmd);
      input_rdy = 1'b0;
      idle      = 1'b0;
      case (cmd)
        8'h01: begin
          getbyte(b1);
          getbyte(b2);
          mc(ADD_MC);
          putbyte(b1 + b2);
        end
        8'h02: begin
          getbyte(b1); getbyte(b2); getbyte(b3); getbyte(b4);
          prod = 16'({b1, b2} * {b3, b4});
          mc(ADD_MC);
          led = 1'b0;
          putbyte(prod[15:8]);
          putbyte(prod[7:0]);
        end
        8'h03: run_pi();
        default: p2 = 8'hAB;
      endcase
      tasks_done++;
    end
  end

endmodule
