// Bit-serial handshaking (BSHS) module with NCH input channels.
//
// The module holds one NBITS-bit word per channel and passes it on only when
// the next stage has room, which keeps the ordering of data through an
// asynchronous pipeline without a global clock. Per channel there is a DDST
// shift register that stores the incoming bit-serial word, clocked by the
// data themselves, and a completion detector (CD) that counts its bits. A
// C-element joins the channels' completion pulses into one request (REQ),
// which is issued only when every input word has arrived. A second C-element
// joins REQ with the acknowledge (ACK): the acknowledge says that the
// following stage has passed its own word on and can take a new one. When
// both are present the clock generator (CG) fires a burst of NBITS pulses
// that pushes all channels' words out in parallel, one bit per pulse. With
// several following stages the module takes NACK acknowledges and joins them
// in one more C-element before they meet REQ.
//
// REQ is also the module's own acknowledge output: once a whole word has
// arrived here, the stage before this one has emptied, so the stage two
// places upstream may send again. The ACK input of a module is therefore
// driven by the ACK output of the module two places downstream (or from
// outside at the end of a chain).
//
// Interface: `din`/`dout` are NCH dual-rail lines, `ack_in` NACK pulse
// inputs, `ack_out` and `req` pulses (the same event), `busy` high while the
// CG burst runs. The logic block that may follow the shift registers is kept
// outside this module.
// Timing (steps): ACK to first output bit 3, last input bit to ACK out 2,
// last input bit to first output bit 5 when ACK is already there; output bits
// follow one per CG period.
module bshs_module #(
  parameter int unsigned     NCH       = 2,
  parameter int unsigned     NBITS     = 4,
  parameter int unsigned     NACK      = 1,
  parameter int unsigned     CG_PERIOD = 1,
  parameter logic [NACK-1:0] ACK_INIT  = '0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  bshs_pkg::dr_t [NCH-1:0] din,
  input  logic [NACK-1:0]         ack_in,
  output bshs_pkg::dr_t [NCH-1:0] dout,
  output logic                    req,
  output logic                    ack_out,
  output logic                    busy
);

  localparam int unsigned CD_STAGES = $clog2(NBITS);

  logic [NCH-1:0] ch_done;
  logic           ack_all;
  logic           trig;
  logic           shift;

  for (genvar c = 0; c < NCH; c++) begin : g_ch
    completion_detector #(.STAGES(CD_STAGES)) u_cd (
      .clk, .rst_n, .din(din[c]), .done(ch_done[c])
    );

    ddst_sr #(.DEPTH(NBITS)) u_sr (
      .clk, .rst_n, .din(din[c]), .shift(shift), .dout(dout[c])
    );
  end

  // All input words complete: request.
  if (NCH > 1) begin : g_req_join
    c_element #(.N(NCH)) u_c_req (.clk, .rst_n, .in(ch_done), .y(req));
  end else begin : g_req_single
    assign req = ch_done[0];
  end

  // All following stages acknowledged.
  if (NACK > 1) begin : g_ack_join
    c_element #(.N(NACK), .INIT(ACK_INIT)) u_c_ack (.clk, .rst_n, .in(ack_in), .y(ack_all));
  end else begin : g_ack_single
    assign ack_all = ack_in[0];
  end

  // Request meets acknowledge: start the transfer.
  c_element #(.N(2), .INIT({(NACK > 1) ? 1'b0 : ACK_INIT[0], 1'b0})) u_c_trig (
    .clk, .rst_n, .in({ack_all, req}), .y(trig)
  );

  clock_generator #(.NPULSE(NBITS), .PERIOD(CG_PERIOD)) u_cg (
    .clk, .rst_n, .trig(trig), .clk_out(shift), .busy(busy)
  );

  assign ack_out = req;

  initial begin
    assert (NBITS == (1 << CD_STAGES) && NBITS >= 2)
      else $fatal(1, "bshs_module: NBITS must be a power of two, at least 2");
  end

endmodule
