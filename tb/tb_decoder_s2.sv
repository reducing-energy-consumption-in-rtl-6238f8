// tb_decoder_s2: self-checking testbench of the Scheme II decoder at W = 32.
//
// Feeds link words built by the reference model (every inversion the scheme allows, applied
// to random payloads, plus head flits that must pass untouched) and checks that the decoder
// restores the payload, clears the control lines, keeps the kind and passes valid and ready
// straight through.
module tb_decoder_s2;
  import nocenc_pkg::*;
  import tb_ref_pkg::*;
  localparam int W = 32;
  localparam int NC = 2;

  logic link_valid, link_ready, out_valid, out_ready;
  flit_kind_e link_kind, out_kind;
  logic [W-1:0] link_data, out_data;
  int checks = 0, failures = 0;
  int n_opt[4];

  decoder_s2 #(.W(W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [MAXW-1:0] raw, masks[4];
    int nopt, k;
    logic hd;
    masks[0] = '0;
    masks[1] = odd_mask(W);
    masks[2] = all_mask(W);
    masks[3] = all_mask(W) & ~odd_mask(W);
    nopt = (2 == 1) ? 2 : (2 == 2) ? 3 : 4;
    for (int i = 0; i < 4; i++) n_opt[i] = 0;
    for (int i = 0; i < 4000; i++) begin
      raw = MAXW'($urandom);
      hd = ($urandom % 5) == 0;
      link_valid = 1'($urandom); out_ready = 1'($urandom);
      if (hd) begin
        link_kind = ($urandom % 2) ? KIND_HEAD : KIND_HEADTAIL;
        link_data = W'(raw);
      end else begin
        raw = raw & ((MAXW'(1) << (W - NC)) - 1);
        k = $urandom % nopt;
        n_opt[k]++;
        link_kind = ($urandom % 2) ? KIND_BODY : KIND_TAIL;
        link_data = W'(raw ^ masks[k]);
      end
      #1;
      checks++;
      if (out_data !== W'(raw) || out_kind !== link_kind || out_valid !== link_valid || link_ready !== out_ready) begin
        failures++;
        if (failures < 10) $display("FAIL link=%h kind=%0d out=%h expected %h", link_data, link_kind, out_data, W'(raw));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
