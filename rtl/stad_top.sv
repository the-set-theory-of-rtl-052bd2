// stad_top: the example arithmetic structures of the decomposition method, side by side.
//
// Each structure is an independent combinational circuit; all but the last two are assembled only
// from decomposition operators (PA2.1, CG3.2, RCG4.2, their radix-3 counterparts and one
// radix-5 carry generator). They share no signals and each has its own ports, prefixed:
//   pc2_   radix-2 parallel counter, 11 inputs       (par_counter11)
//   pc3_   radix-3 parallel counter, 11 inputs       (par_counter11_r3)
//   csa_   3-bit carry save adder                    (csa3)
//   sd4_   radix-4 signed-digit adder, SD4_N digits  (sd_adder_r4)
//   sd16_  radix-16 signed-digit adder, SD16_N digits (sd_adder_r16)
//   mul_   two-digit radix-2 redundant multiplier    (red_mult_r2)
//   muln_  MULN_N-digit radix-2 redundant array multiplier (red_mult_rn)
//   dec_   radix-10 digit adder                      (decimal_adder)
//   srcg_  radix-4 super redundant carry generator   (srcg12_6)
//   sdr_   general even-radix signed-digit adder at radix SDR_R, SDR_N digits, written
//          per digit as integer equations            (sd_adder_even)
//   fa_    non-redundant radix-FA_R full adder made of a partial adder and a carry
//          generator                                  (full_adder_rn)
// Digit formats are those of stad_pkg. There is no clock: every output settles a few
// operator delays after its inputs. Word lengths of the two signed-digit adders are this
// design's choice (the document fixes none).
module stad_top #(
  parameter int unsigned SD4_N  = 8,
  parameter int unsigned SD16_N = 8,
  parameter int unsigned SDR_R  = 8,
  parameter int unsigned SDR_N  = 4,
  parameter int unsigned FA_R   = 4,
  parameter int unsigned MULN_N = 4,
  localparam int unsigned SDR_W = $clog2(SDR_R + 1),
  localparam int unsigned FA_W  = $clog2(FA_R)
) (
  input  logic [10:0]     pc2_x,
  output logic [1:0]      pc2_y4,
  output logic            pc2_y2,
  output logic            pc2_y1,

  input  logic [10:0]     pc3_x,
  output logic            pc3_y9,
  output logic [1:0]      pc3_y3,
  output logic [1:0]      pc3_y1,

  input  logic [1:0]      csa_acc [3],
  input  logic [2:0]      csa_x,
  input  logic            csa_cin,
  output logic [1:0]      csa_sum [3],
  output logic            csa_cout,

  input  stad_pkg::sd4_t  sd4_x [SD4_N],
  input  stad_pkg::sd4_t  sd4_y [SD4_N],
  output stad_pkg::sd4_t  sd4_z [SD4_N],
  output logic            sd4_t_out,
  output logic            sd4_t2_out,

  input  stad_pkg::sd16_t sd16_x [SD16_N],
  input  stad_pkg::sd16_t sd16_y [SD16_N],
  output stad_pkg::sd16_t sd16_z [SD16_N],
  output logic [1:0]      sd16_t_out,

  input  logic [1:0]      mul_a [2],
  input  logic [1:0]      mul_b [2],
  output logic [1:0]      mul_p [4],

  input  stad_pkg::dec_t  dec_x,
  input  stad_pkg::dec_t  dec_y,
  input  logic            dec_cin,
  output stad_pkg::dec_t  dec_z,
  output logic            dec_cout,

  input  logic [1:0]      srcg_a1, srcg_a0, srcg_b1, srcg_b0,
  output logic [1:0]      srcg_h,
  output logic            srcg_l1,
  output logic [1:0]      srcg_l0,

  input  logic [SDR_W-1:0] sdr_x [SDR_N],
  input  logic [SDR_W-1:0] sdr_y [SDR_N],
  output logic [SDR_W-1:0] sdr_z [SDR_N],
  output logic             sdr_t_out,
  output logic             sdr_t2_out,

  input  logic [FA_W-1:0]  fa_a,
  input  logic [FA_W-1:0]  fa_b,
  input  logic             fa_cin,
  output logic             fa_cout,
  output logic [FA_W-1:0]  fa_s,

  input  logic [1:0]       muln_a [MULN_N],
  input  logic [1:0]       muln_b [MULN_N],
  output logic [1:0]       muln_p [2*MULN_N]
);
  par_counter11    u_pc2  (.x(pc2_x), .y4(pc2_y4), .y2(pc2_y2), .y1(pc2_y1));
  par_counter11_r3 u_pc3  (.x(pc3_x), .y9(pc3_y9), .y3(pc3_y3), .y1(pc3_y1));
  csa3             u_csa  (.acc(csa_acc), .x(csa_x), .cin(csa_cin), .sum(csa_sum), .cout(csa_cout));
  sd_adder_r4  #(.N(SD4_N))  u_sd4  (.x(sd4_x), .y(sd4_y), .z(sd4_z),
                                     .t_out(sd4_t_out), .t2_out(sd4_t2_out));
  sd_adder_r16 #(.N(SD16_N)) u_sd16 (.x(sd16_x), .y(sd16_y), .z(sd16_z), .t_out(sd16_t_out));
  red_mult_r2      u_mul  (.a(mul_a), .b(mul_b), .p(mul_p));
  decimal_adder    u_dec  (.x(dec_x), .y(dec_y), .cin(dec_cin), .z(dec_z), .cout(dec_cout));
  srcg12_6         u_srcg (.a1(srcg_a1), .a0(srcg_a0), .b1(srcg_b1), .b0(srcg_b0),
                           .h(srcg_h), .l1(srcg_l1), .l0(srcg_l0));
  sd_adder_even #(.R(SDR_R), .N(SDR_N)) u_sdr (.x(sdr_x), .y(sdr_y), .z(sdr_z),
                                             .t_out(sdr_t_out), .t2_out(sdr_t2_out));
  red_mult_rn #(.N(MULN_N)) u_muln (.a(muln_a), .b(muln_b), .p(muln_p));
  full_adder_rn #(.R(FA_R)) u_fa (.a(fa_a), .b(fa_b), .cin(fa_cin), .cout(fa_cout), .s(fa_s));
endmodule
