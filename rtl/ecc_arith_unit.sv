// ecc_arith_unit: the prime-field arithmetic unit of an ECC processor working on
// signed-digit operands. It performs modular addition, modular subtraction and
// Karatsuba multiplication on N-digit redundant signed digit (RSD) or canonical
// signed digit (CSD) operands; the same carry-free datapath serves both
// representations, which differ only in how the operands are spelled.
//
// Operand formats (fmt):
//   FMT_RSD    : binary a, b, m become RSD digits with an empty negative part.
//   FMT_CSD    : binary a, b, m are recoded to CSD by bin_to_csd. When a value's
//                CSD needs N+1 digits (above about 2/3 of 2^N) it does not fit
//                the N-digit datapath, and its plain binary spelling, also a
//                valid signed-digit vector, is used instead; csd_fallback flags
//                this for the operation.
//   FMT_DIGITS : x_in, y_in, m_in are taken as given, any RSD spelling.
// Operations (op):
//   OP_MODADD  : z = (X + Y) mod M   (rsd_mod_adder, result congruent, not
//                reduced to [0, M), N+3 digits)
//   OP_MODSUB  : z = (X - Y) mod M   (rsd_mod_sub)
//   OP_MUL_REC : z = X * Y           (karatsuba_rsd, combinational)
//   OP_MUL_ITR : z = X * Y           (karatsuba_iter, one shared half-size
//                                     multiplier over several clocks)
// The multipliers return the full product, as the worked example 85 x 59 = 5015
// does; reduction of a product modulo M is not part of the described unit.
//
// Timing: a request is accepted on a clock edge with in_valid and in_ready
// high; the operands are converted and registered there. Modular add/sub and
// the recursive multiplier compute in the following cycle and their result is
// registered on the next edge: out_valid is high for one cycle starting one
// clock after the accepting edge (LAT_COMB = 1). The iterative multiplier is
// started on that edge and needs its own 4 clocks plus one to hand over the
// product: out_valid comes 6 clocks after the accepting edge (LAT_ITR = 6).
// in_ready is low while an operation runs, so a request presented then waits.
// z holds its value
// until the next result. Reset is synchronous and active high.
//
// The units, the representations and the example operands follow the design
// description; the operand formats, handshake, registers and csd_fallback are
// this design's choices.
module ecc_arith_unit
  import rsd_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic                 clk,
  input  logic                 rst,
  // request
  input  logic                 in_valid,
  output logic                 in_ready,
  input  op_e                  op,
  input  fmt_e                 fmt,
  input  logic [N-1:0]         a,
  input  logic [N-1:0]         b,
  input  logic [N-1:0]         m,
  input  sd_t  [N-1:0]         x_in,
  input  sd_t  [N-1:0]         y_in,
  input  sd_t  [N-1:0]         m_in,
  // result
  output logic                 out_valid,
  output sd_t  [((N + 3 > kara_digits(N)) ? N + 3 : kara_digits(N))-1:0] z,
  output logic                 csd_fallback
);

  localparam int PW = kara_digits(N);
  localparam int ZW = (N + 3 > PW) ? N + 3 : PW;

  typedef enum logic [1:0] {S_IDLE, S_EXEC, S_WAIT} state_e;

  state_e       state;
  op_e          op_q;
  sd_t [N-1:0]  x_q, y_q, m_q;          // registered operands (X, Y, M1)
  sd_t [N-1:0]  x_c, y_c, m_c;          // converted operands
  sd_t [N:0]    a_csd, b_csd, m_csd;
  logic         fb_c;
  sd_t [N+2:0]  add_s, sub_s;
  sd_t [PW-1:0] mul_p, itr_p;
  logic         itr_start, itr_busy, itr_done;
  sd_t [ZW-1:0] res_c;

  // ------------------------------------------------------------ conversion
  bin_to_csd #(.N(N)) u_csd_a (.b(a), .d(a_csd));
  bin_to_csd #(.N(N)) u_csd_b (.b(b), .d(b_csd));
  bin_to_csd #(.N(N)) u_csd_m (.b(m), .d(m_csd));

  function automatic sd_t [N-1:0] as_rsd(logic [N-1:0] v);
    sd_t [N-1:0] r;
    for (int i = 0; i < N; i++) r[i] = '{p: v[i], n: 1'b0};
    return r;
  endfunction

  always_comb begin
    fb_c = 1'b0;
    unique case (fmt)
      FMT_CSD: begin
        x_c = a_csd[N] != '0 ? as_rsd(a) : a_csd[N-1:0];
        y_c = b_csd[N] != '0 ? as_rsd(b) : b_csd[N-1:0];
        m_c = m_csd[N] != '0 ? as_rsd(m) : m_csd[N-1:0];
        fb_c = (a_csd[N] != '0) | (b_csd[N] != '0) | (m_csd[N] != '0);
      end
      FMT_DIGITS: begin
        x_c = x_in;
        y_c = y_in;
        m_c = m_in;
      end
      default: begin
        x_c = as_rsd(a);
        y_c = as_rsd(b);
        m_c = as_rsd(m);
      end
    endcase
  end

  // ------------------------------------------------------------ datapath
  rsd_mod_adder  #(.N(N)) u_modadd (.x(x_q), .y(y_q), .m(m_q), .s(add_s));
  rsd_mod_sub    #(.N(N)) u_modsub (.x(x_q), .y(y_q), .m(m_q), .s(sub_s));
  karatsuba_rsd  #(.N(N)) u_mulrec (.a(x_q), .b(y_q), .p(mul_p));
  karatsuba_iter #(.N(N)) u_mulitr (
    .clk(clk), .rst(rst), .start(itr_start), .a(x_q), .b(y_q),
    .busy(itr_busy), .done(itr_done), .p(itr_p)
  );

  assign itr_start = (state == S_EXEC) && (op_q == OP_MUL_ITR);

  always_comb begin
    res_c = '0;
    unique case (op_q)
      OP_MODADD:  res_c[N+2:0]  = add_s;
      OP_MODSUB:  res_c[N+2:0]  = sub_s;
      OP_MUL_REC: res_c[PW-1:0] = mul_p;
      default:    res_c[PW-1:0] = itr_p;
    endcase
  end

  // ------------------------------------------------------------ control
  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= S_IDLE;
      op_q         <= OP_MODADD;
      x_q          <= '0;
      y_q          <= '0;
      m_q          <= '0;
      z            <= '0;
      out_valid    <= 1'b0;
      csd_fallback <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (in_valid) begin
          op_q         <= op;
          x_q          <= x_c;
          y_q          <= y_c;
          m_q          <= m_c;
          csd_fallback <= fb_c;
          state        <= S_EXEC;
        end
        S_EXEC: begin
          if (op_q == OP_MUL_ITR) begin
            state <= S_WAIT;
          end else begin
            z         <= res_c;
            out_valid <= 1'b1;
            state     <= S_IDLE;
          end
        end
        S_WAIT: if (itr_done) begin
          z         <= res_c;
          out_valid <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign in_ready = (state == S_IDLE);

  a_one_shot : assert property (@(posedge clk) disable iff (rst) out_valid |=> !out_valid);
  a_itr_idle : assert property (@(posedge clk) disable iff (rst)
                                (state == S_IDLE) |-> !itr_busy);

endmodule
