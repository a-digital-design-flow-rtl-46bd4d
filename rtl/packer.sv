// packer: the sending half of the packager. It merges the response stream
// of the downlink and the one-word responses (ACK, NACK, FAIL, FETCH) of
// the control blocks onto the single 64-bit output port to the baseband.
//
// Stream words (RES header and data words) go into a FIFO of SDEPTH words
// that accepts the header and a data word in the same cycle. Each of the
// NEV one-word response sources has its own FIFO of EDEPTH words; a
// response becomes the word of event_word() (type, error, id, fn, ls).
// Every cycle one word is sent: a stream word if there is one, otherwise a
// response, the lowest-numbered source first. Stream words therefore keep
// their order and are delayed only by other stream words. Once a RES
// header has been sent, responses are held back until the nb data words it
// announces (header bits [23:0]) have followed, so that a RES packet always
// reaches the baseband in one piece even if its data words come with gaps. The baseband is
// assumed to take a word every cycle (no back-pressure). busy is high while
// any word waits; overflow is sticky and reports a word lost to a full FIFO.
//
// Timing: a word offered in cycle t leaves at the earliest in cycle t+1.
// Synchronous active-low reset.
//
// Packing responses with a type identifier and sending the header first
// follow the original packager; the FIFOs and the priority order are this
// design's own choices.
module packer
  import digif_pkg::*;
#(
  parameter int unsigned NEV    = 4,
  parameter int unsigned SDEPTH = 16,
  parameter int unsigned EDEPTH = 4,
  localparam int unsigned SAW = $clog2(SDEPTH)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            st_hdr_valid,
  input  logic [BB_W-1:0] st_hdr,
  input  logic            st_valid,
  input  logic [BB_W-1:0] st_data,
  input  logic [NEV-1:0]  ev_valid,
  input  event_t          ev [NEV],
  output logic            bb_out_valid,
  output logic [BB_W-1:0] bb_out_data,
  output logic            busy,
  output logic            overflow
);
  // ------------------------------------------------------ stream FIFO
  // each entry: {is_header, word}
  logic [BB_W:0]   smem [SDEPTH];
  logic [SAW:0]    swp, srp, sfree;
  logic            s_empty, s_pop, s_ovf;
  logic [BB_W:0]   s_head;
  logic [23:0]     pending;      // data words still owed to the last header

  assign s_empty = (swp == srp);
  assign sfree   = (SAW+1)'(SDEPTH) - (swp - srp);
  assign s_pop   = !s_empty;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      swp   <= '0;
      srp   <= '0;
      s_ovf <= 1'b0;
    end else begin
      if (s_pop) srp <= srp + 1'b1;
      if (st_hdr_valid && st_valid) begin
        if (sfree < 2) s_ovf <= 1'b1;
        else begin
          smem[swp[SAW-1:0]]          <= {1'b1, st_hdr};
          smem[SAW'(swp[SAW-1:0] + 1)] <= {1'b0, st_data};
          swp <= swp + (SAW+1)'(2);
        end
      end else if (st_hdr_valid || st_valid) begin
        if (sfree == 0) s_ovf <= 1'b1;
        else begin
          smem[swp[SAW-1:0]] <= st_hdr_valid ? {1'b1, st_hdr} : {1'b0, st_data};
          swp <= swp + 1'b1;
        end
      end
    end
  end

  // ------------------------------------------------------ response FIFOs
  logic [BB_W-1:0] e_dout [NEV];
  logic [NEV-1:0]  e_empty, e_pop, e_ovf;

  for (genvar i = 0; i < NEV; i++) begin : g_ev
    sync_fifo #(.W(BB_W), .DEPTH(EDEPTH)) u_fifo (
      .clk(clk), .rst_n(rst_n), .push(ev_valid[i]), .din(event_word(ev[i])),
      .pop(e_pop[i]), .dout(e_dout[i]), .empty(e_empty[i]), .overflow(e_ovf[i])
    );
  end

  assign s_head = smem[srp[SAW-1:0]];

  always_ff @(posedge clk) begin
    if (!rst_n) pending <= '0;
    else if (s_pop) begin
      if (s_head[BB_W])        pending <= s_head[23:0];
      else if (pending != '0)  pending <= pending - 1'b1;
    end
  end

  always_comb begin
    e_pop = '0;
    if (s_empty && pending == '0) begin
      for (int i = NEV-1; i >= 0; i--)
        if (!e_empty[i]) e_pop = NEV'(1) << i;
    end
  end

  // ------------------------------------------------------ output register
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bb_out_valid <= 1'b0;
      bb_out_data  <= '0;
    end else begin
      bb_out_valid <= 1'b0;
      if (!s_empty) begin
        bb_out_valid <= 1'b1;
        bb_out_data  <= s_head[BB_W-1:0];
      end else begin
        for (int i = NEV-1; i >= 0; i--)
          if (e_pop[i]) begin
            bb_out_valid <= 1'b1;
            bb_out_data  <= e_dout[i];
          end
      end
    end
  end

  assign busy     = !s_empty || !(&e_empty);
  assign overflow = s_ovf || (|e_ovf);
endmodule
