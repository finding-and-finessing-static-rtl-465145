// vnt_loop1: the second loop of the vecNormTrans kernel as one static
// island,
//   for (i = 0; i < N - 4; i++)  r[i + 4] = r[i] + a[i] / w;
// where w is the weight produced by the first loop.
//
// The whole loop runs on a fixed schedule. Iteration i starts II enabled
// cycles after iteration i - 1 and, counted from its start (k = 0):
//   k = 0            read a[i]
//   k = 1            a[i] / w enters the divider
//   k = DIV_LAT      read r[i]
//   k = DIV_LAT + 1  r[i] + quotient enters the adder
//   k = WR           write the sum to r[i + 4], WR = DIV_LAT + 1 + ADD_LAT
// r[i + 4] is read again by iteration i + 4, 4 * II cycles later in the
// same position of its schedule; the write must come at least one cycle
// before that read, so 4 * II >= ADD_LAT + 2. With the 4-cycle adder this
// gives II = 2, the default. A shift register of start bits and a matching
// line of indices, both moved by the clock enable, tell each stage which
// iteration it holds. Because the schedule is fixed, the dependence
// through memory needs no load-store queue.
//
// Interface:
//  * w: valid/ready. The loop starts when w is taken, and only while it
//    is idle.
//  * done: valid/ready. Offered in the cycle after the last write. The
//    loop is idle again when done is taken. With mem_ce high, done comes
//    (N - 5) * II + DIV_LAT + ADD_LAT + 4 cycles after the cycle in which
//    w is taken (40 at the defaults).
//  * Memory ports for a[] (read) and r[] (read and write), for memories
//    outside: on a rising edge with *_en high the memory returns the word
//    at *_addr on *_rdata, and holds it while *_en is low. A write with
//    r_we high takes effect at the same edge. All memory enables are the
//    island's clock enable, so a low mem_ce freezes the memories' read
//    ports together with the island.
// The loop, its bounds and the memory dependence follow the kernel; the
// whole loop forming one static island and its interval of 2 follow the
// kernel's description; the schedule, the memory port timing, the
// divider latency and the array length N are this design's choices.
module vnt_loop1
  import si_pkg::*;
#(
  parameter int unsigned N       = 16,
  parameter int unsigned ADD_LAT = 4,
  parameter int unsigned DIV_LAT = 10,
  parameter int unsigned II      = 2,
  localparam int unsigned AW     = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          mem_ce,
  input  logic          w_valid,
  output logic          w_ready,
  input  float32_t      w_data,
  output logic          done_valid,
  input  logic          done_ready,
  output logic          a_en,
  output logic [AW-1:0] a_addr,
  input  float32_t      a_rdata,
  output logic          r_en,
  output logic [AW-1:0] r_raddr,
  input  float32_t      r_rdata,
  output logic          r_we,
  output logic [AW-1:0] r_waddr,
  output float32_t      r_wdata
);

  localparam int unsigned NIT = N - 4;                    // iterations
  localparam int unsigned WR  = DIV_LAT + 1 + ADD_LAT;    // stage of the write
  localparam int unsigned PW  = (II > 1) ? $clog2(II) : 1;

  if (N < 5) begin : g_n_check
    $error("vnt_loop1: N must be at least 5");
  end
  if (4 * II < ADD_LAT + 2) begin : g_ii_check
    $error("vnt_loop1: 4 * II < ADD_LAT + 2 reads r[i + 4] before it is written");
  end

  typedef enum logic [1:0] {IDLE, RUN, DONE} state_t;
  state_t state;

  logic          ce, issue, last_issued, drained;
  logic [PW-1:0] phase;
  logic [AW-1:0] next_i;
  logic [WR:1]   tok;
  logic [AW-1:0] idx [1:WR];                              // idx[k]: iteration at stage k
  float32_t      w_reg, q, sum;

  assign ce         = mem_ce && (state == RUN);
  assign issue      = ce && (phase == '0) && !last_issued;
  assign drained    = last_issued && (tok == '0);
  assign w_ready    = (state == IDLE);
  assign done_valid = (state == DONE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= IDLE;
      phase       <= '0;
      next_i      <= '0;
      last_issued <= 1'b0;
    end else begin
      unique case (state)
        IDLE: if (w_valid) begin
          w_reg       <= w_data;
          state       <= RUN;
          phase       <= '0;
          next_i      <= '0;
          last_issued <= 1'b0;
        end
        RUN: begin
          if (ce) begin
            phase <= (phase == PW'(II - 1)) ? '0 : phase + 1'b1;
            if (issue) begin
              next_i <= next_i + 1'b1;
              if (next_i == AW'(NIT - 1)) last_issued <= 1'b1;
            end
          end
          if (drained) state <= DONE;
        end
        DONE: if (done_ready) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  // Start bits and iteration indices, one stage per enabled cycle; the
  // iteration issuing now is next_i.

  always_ff @(posedge clk) begin
    if (rst) tok <= '0;
    else if (ce) tok <= {tok[WR-1:1], issue};
  end

  always_ff @(posedge clk) begin
    if (ce) begin
      idx[1] <= next_i;
      for (int k = 2; k <= WR; k++) idx[k] <= idx[k-1];
    end
  end

  // Datapath.
  fp_div #(.LATENCY(DIV_LAT)) u_div (.clk, .en(ce), .a(a_rdata), .b(w_reg), .y(q));
  fp_add #(.LATENCY(ADD_LAT)) u_add (.clk, .en(ce), .a(r_rdata), .b(q),     .y(sum));

  assign a_en    = ce;
  assign a_addr  = next_i;
  assign r_en    = ce;
  assign r_raddr = idx[DIV_LAT];
  assign r_we    = ce && tok[WR];
  assign r_waddr = idx[WR] + AW'(4);
  assign r_wdata = sum;

endmodule
