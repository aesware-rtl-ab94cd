// aesware_apb1: the APB1 port of AESware, through which cores ask for the
// AES operator and learn what to do.
//
// Each core has its own APB slave port here. A write to address 0x000
// posts a request: wdata[1:0] key length (keylen_e), wdata[31:16] the
// core's own software time for this operation in cycles (SW_time). The
// port hands at most one request per cycle to the arbiter; when several
// cores write in the same cycle the lowest-numbered core goes first and the
// others see PREADY low until their turn. A core that already has a
// request waiting gets PSLVERR.
// A read of address 0x000 returns the Concatenation of the core's tag and
// its direction bits: prdata[1:0] = direction (0 none, 1 use the operator
// via APB2, 2 run in software, 3 queued), prdata[2 +: TAGW] = tag. The
// direction of a core is set to 3 by its request and overwritten by the
// arbiter's decision for that tag.
//
// The original design fixes the direction bits in the lower 2 bits, returned with
// the core tag; the per-core ports, the address and field layout and the
// serialization are this design's choices. Reads complete with no wait
// state; a write completes in the cycle the arbiter takes it.
module aesware_apb1
  import aes_pkg::*;
#(
  parameter int unsigned NCORE = 8,
  parameter int unsigned TAGW  = (NCORE > 1) ? $clog2(NCORE) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  apb_req_t          apb_req [NCORE],
  output apb_rsp_t          apb_rsp [NCORE],
  // to the arbiter
  output logic              req_valid,
  output logic [TAGW-1:0]   req_tag,
  output logic [1:0]        req_keylen,
  output logic [TIME_W-1:0] req_sw_time,
  // from the arbiter
  input  logic              dec_valid,
  input  logic [TAGW-1:0]   dec_tag,
  input  dir_e              dec_dir
);
  dir_e dir [NCORE];
  logic [NCORE-1:0] wr_acc;

  always_comb begin
    req_valid   = 1'b0;
    req_tag     = '0;
    req_keylen  = '0;
    req_sw_time = '0;
    wr_acc      = '0;
    for (int c = 0; c < NCORE; c++) begin
      apb_rsp[c] = '{pready: 1'b1, prdata: 32'h0, pslverr: 1'b0};
      if (apb_req[c].psel && apb_req[c].penable) begin
        if (apb_req[c].paddr != 12'h000 || (apb_req[c].pwrite && (dir[c] == DIR_WAIT ||
                                                                  apb_req[c].pwdata[1:0] == 2'b11))) begin
          apb_rsp[c].pslverr = 1'b1;
        end else if (apb_req[c].pwrite) begin
          if (!req_valid) begin
            req_valid   = 1'b1;
            req_tag     = TAGW'(c);
            req_keylen  = apb_req[c].pwdata[1:0];
            req_sw_time = apb_req[c].pwdata[31:16];
            wr_acc[c]   = 1'b1;
          end else begin
            apb_rsp[c].pready = 1'b0;   // another core goes first
          end
        end else begin
          apb_rsp[c].prdata = 32'({TAGW'(c), dir[c]});
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NCORE; c++) dir[c] <= DIR_NONE;
    end else begin
      for (int c = 0; c < NCORE; c++) begin
        if (wr_acc[c])                            dir[c] <= DIR_WAIT;
        else if (dec_valid && dec_tag == TAGW'(c)) dir[c] <= dec_dir;
      end
    end
  end

  for (genvar c = 0; c < NCORE; c++) begin : g_chk
    // APB: PENABLE is only raised together with PSEL
    a_apb_en: assert property (@(posedge clk) disable iff (!rst_n)
                               apb_req[c].penable |-> apb_req[c].psel);
  end

endmodule
