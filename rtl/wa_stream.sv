// Write-address path of one spatial stream.
//
// Looks up the stream's rotation offsets (I_x, J_y), evaluates the three
// boundary comparisons, runs the BPSK/QPSK, 16-QAM and 64-QAM generators in
// parallel and routes one of them to WA_x with a 4:1 multiplexer on the
// modulation code (00 and 01 both take the BPSK/QPSK generator). The row and
// column counters and the block dimensions are shared by all streams and come
// in as inputs. Combinational: WA_x follows the counters in the same cycle.
module wa_stream
  import intlv_pkg::*;
#(
  parameter int unsigned STREAM = 1
) (
  input  bw_e        bw,
  input  mod_e       nbpscs,
  input  cnt_t       icount,
  input  cnt_t       jcount,
  input  logic [1:0] imod3,
  input  logic [1:0] jmod3,
  input  cnt_t       c,
  input  cnt_t       d,
  output addr_t      wa
);

  cnt_t  ix, jy;
  logic  i_lt, i_lt1, j_lt;
  addr_t wa_bq, wa_16, wa_64;

  stream_offsets u_ofs (
    .iss(2'(STREAM - 1)), .bw, .nbpscs, .ix, .jy
  );

  boundary_compare u_cmp (
    .icount, .jcount, .c, .d, .ix, .jy, .i_lt, .i_lt1, .j_lt
  );

  wa_gen_bq u_bq (
    .icount, .jcount, .c, .d, .ix, .jy, .i_lt, .i_lt1, .j_lt, .wa(wa_bq)
  );

  wa_gen_qam16 u_16 (
    .icount, .jcount, .c, .d, .ix, .jy, .i_lt, .i_lt1, .j_lt, .wa(wa_16)
  );

  wa_gen_qam64 u_64 (
    .icount, .jcount, .imod3, .jmod3, .c, .d, .ix, .jy, .i_lt, .i_lt1, .j_lt, .wa(wa_64)
  );

  always_comb begin
    unique case (nbpscs)
      MOD_BPSK, MOD_QPSK: wa = wa_bq;
      MOD_QAM16:          wa = wa_16;
      default:            wa = wa_64;
    endcase
  end

endmodule
