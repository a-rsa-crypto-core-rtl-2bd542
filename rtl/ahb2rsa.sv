// ahb2rsa: AHB slave wrapper around the RSA exponentiation kernel; the top
// of the design.
//
// A processor loads the operands word by word over the bus, writes START,
// polls STATUS and reads the result.  The wrapper registers the address
// phase of each transfer (HSEL, HREADY, HTRANS, HWRITE, HADDR), decodes the
// word address in the data phase, and steers HWDATA into the kernel
// registers.  Reads return configuration, status or result words.  It never
// inserts wait states and never signals an error, so HREADYOut is tied to 1
// and HRESP to OKAY; only HTRANS[1] (NONSEQ/SEQ against IDLE/BUSY) and the
// address bits of the map below are looked at.  Writes while
// the kernel is busy are ignored, except that they land in MODE and SEED.
//
// Word address map (byte address = base + 4 * word), with IW = log2(NMAX/W)
// index bits (7 for the defaults) and a 3-bit region above them:
//   region 0  word 0  MODE   bits [12:0] modulus length n (1 .. NMAX)
//             word 1  START  write bit 0 = 1 to start an exponentiation
//             word 2  STATUS read: bit 0 busy, bit 1 out_valid
//             word 3  SEED   PRNG seed (bits [15:0])
//             word 4  FIELD  bit 0: 0 = GF(p), 1 = GF(2^n)
//   region 1  N        modulus, word i = bits [W*i +: W]
//   region 2  M        message
//   region 3  E        key
//   region 4  PHI      phi(N), used for key blinding
//   region 5  R2       2^(2(n+P)) mod N
//   region 6  C        result (read)
// The bus data width equals the word size W (32 bits by default; at least
// 16 so that MODE and SEED fit in one transfer).
//
// From the document: an AHB slave wrapper with registered bus inputs, an
// address decoder, registers for r2, M, N, E and the mode, a start
// register, and read-back of the ciphertext and an output-valid flag.
// Choices of this implementation: the whole key, phi(N) and the PRNG seed
// are loaded over the bus, and the region layout above.
//
// Lint notes: HTRANS[0] and the HADDR bits outside the map are not needed;
// HRESP and HREADYOut are constant as explained above.
module ahb2rsa
  import rsa_pkg::*;
#(
  parameter int unsigned W    = W_DEF,
  parameter int unsigned P    = P_DEF,
  parameter int unsigned NMAX = NMAX_DEF,
  localparam int unsigned IW  = $clog2(NMAX / W),
  localparam int unsigned AW  = IW + 3 + 2
) (
  input  logic          HCLK,
  input  logic          HRESETn,
  input  logic          HSELRSA,
  input  logic          HREADYIn,
  input  logic [1:0]    HTRANS,
  input  logic          HWRITE,
  input  logic [31:0]   HADDR,
  input  logic [W-1:0]  HWDATA,
  output logic [1:0]    HRESP,
  output logic          HREADYOut,
  output logic [W-1:0]  HRDATA
);

  localparam int unsigned KW    = kw_for(W, P, NMAX);

  localparam logic [2:0] REG_CTRL = 3'd0, REG_N = 3'd1, REG_M = 3'd2, REG_E = 3'd3,
                         REG_PHI = 3'd4, REG_R2 = 3'd5, REG_C = 3'd6;

  // address phase registers
  logic          a_valid, a_write;
  logic [AW-1:2] a_addr;

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      a_valid <= 1'b0;
      a_write <= 1'b0;
      a_addr  <= '0;
    end else if (HREADYIn) begin
      a_valid <= HSELRSA && HTRANS[1];
      a_write <= HWRITE;
      a_addr  <= HADDR[AW-1:2];
    end
  end

  logic [2:0]    region;
  logic [IW-1:0] index;
  assign region = a_addr[AW-1:AW-3];
  assign index  = a_addr[IW+1:2];

  // kernel
  logic            ld_en, start, seed_ld, busy, out_valid;
  rsel_e           ld_sel;
  logic [LENW-1:0] cfg_len;
  logic            cfg_field;
  logic [W-1:0]    rd_data;

  always_comb begin
    ld_en   = 1'b0;
    ld_sel  = RSEL_N;
    start   = 1'b0;
    seed_ld = 1'b0;
    if (a_valid && a_write) begin
      case (region)
        REG_N:   begin ld_en = 1'b1; ld_sel = RSEL_N;   end
        REG_M:   begin ld_en = 1'b1; ld_sel = RSEL_M;   end
        REG_E:   begin ld_en = 1'b1; ld_sel = RSEL_E;   end
        REG_PHI: begin ld_en = 1'b1; ld_sel = RSEL_PHI; end
        REG_R2:  begin ld_en = 1'b1; ld_sel = RSEL_R2;  end
        REG_CTRL: begin
          start   = (index == IW'(1)) && HWDATA[0] && !busy;
          seed_ld = (index == IW'(3));
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      cfg_len   <= LENW'(NMAX);
      cfg_field <= 1'b0;
    end else if (a_valid && a_write && region == REG_CTRL && !busy) begin
      if (index == IW'(0)) cfg_len   <= HWDATA[LENW-1:0];
      if (index == IW'(4)) cfg_field <= HWDATA[0];
    end
  end

  rsa_core #(.W(W), .P(P), .NMAX(NMAX)) u_core (
    .clk      (HCLK),
    .rst_n    (HRESETn),
    .ld_en    (ld_en),
    .ld_sel   (ld_sel),
    .ld_idx   (KW'(index)),
    .ld_data  (HWDATA),
    .seed_ld  (seed_ld),
    .seed     (HWDATA[15:0]),
    .cfg_len  (cfg_len),
    .cfg_field(cfg_field),
    .start    (start),
    .busy     (busy),
    .out_valid(out_valid),
    .rd_idx   (KW'(index)),
    .rd_data  (rd_data)
  );

  always_comb begin
    HRDATA = '0;
    if (a_valid && !a_write) begin
      case (region)
        REG_CTRL: case (index)
          IW'(0):  HRDATA = W'(cfg_len);
          IW'(2):  HRDATA = W'({out_valid, busy});
          IW'(4):  HRDATA = W'(cfg_field);
          default: HRDATA = '0;
        endcase
        REG_C:   HRDATA = rd_data;
        default: HRDATA = '0;
      endcase
    end
  end

  initial assert (W >= 16) else $error("the bus must be at least 16 bits wide");

  assign HREADYOut = 1'b1;
  assign HRESP     = 2'b00;

endmodule
