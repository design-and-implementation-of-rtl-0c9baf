// shift_add_multiplier: sequential W x W unsigned shift-and-add multiplier.
//
// Registers: M holds the multiplicand, and the 2W-bit product register is
// the accumulator A (upper half) joined to Q (lower half), which is loaded
// with the multiplier while A is cleared. Each step, if Q[0] is 1 the
// n-bit adder's result A + M is taken, otherwise A is kept; the (W+1)-bit
// value {carry, A} is then shifted right one place into {A, Q}, the carry
// entering A's MSB and the bit shifted out of Q being dropped. After W
// steps {A, Q} holds the product.
//
// Interface and timing (this design's choice; the algorithm gives no clock
// budget): start is sampled while idle and loads the operands. One step is
// done per clock, so the product is on prod and done pulses for one cycle W
// clocks after the clock edge that saw start. busy is high during the
// steps; start is ignored while busy. prod holds its value until the next
// start. The carry flip-flop C of the classic diagram is not kept as a
// register of its own: the adder's carry goes straight into A's MSB in the
// same step, so C would always be zero between steps. rst_n is an
// asynchronous active-low reset.
module shift_add_multiplier
  import mult_pkg::*;
#(
  parameter int unsigned W    = 32,
  parameter adder_kind_e KIND = ADD_CSLA,
  parameter int unsigned L    = W / 2
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [W-1:0]   multiplicand,
  input  logic [W-1:0]   multiplier,
  output logic           busy,
  output logic           done,
  output logic [2*W-1:0] prod
);
  localparam int unsigned CW = $clog2(W + 1);

  typedef enum logic {IDLE, RUN} state_e;

  state_e        state;
  logic [W-1:0]  m_q, a_q, q_q;
  logic [CW-1:0] step;

  logic [W-1:0]  s;
  logic          c;
  logic [W:0]    kept;

  // n-bit adder: A + M.
  adder_select #(.KIND(KIND), .W(W), .L(L)) u_add (
    .a   (a_q),
    .b   (m_q),
    .sum (s),
    .cout(c)
  );

  // Shift-and-add control: add only when the product register's LSB is 1.
  assign kept = q_q[0] ? {c, s} : {1'b0, a_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      m_q   <= '0;
      a_q   <= '0;
      q_q   <= '0;
      step  <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: begin
          if (start) begin
            m_q   <= multiplicand;
            a_q   <= '0;
            q_q   <= multiplier;
            step  <= '0;
            state <= RUN;
          end
        end
        RUN: begin
          a_q  <= kept[W:1];
          q_q  <= {kept[0], q_q[W-1:1]};
          step <= step + 1'b1;
          if (step == CW'(W - 1)) begin
            state <= IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state == RUN);
  assign prod = {a_q, q_q};

  // done is a single-cycle pulse and never overlaps busy.
  a_done_not_busy: assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);
  a_done_pulse:    assert property (@(posedge clk) disable iff (!rst_n) done |=> !done);
endmodule
