// tb_ecc_datapath: self-checking test of the affine ECC datapath.
// Runs FieldAdd/Sub/Mult/Inv, PointAdd and PointDbl on P-192 operands and
// compares with results computed independently by a software model of the
// curve (constants below). Also checks the cycle count of each instruction
// against the bounds of the design, and that a division by zero flags err.
//
// Expected values are worked out independently in the bench; the cases
// and sizes are this bench's own choice.
module tb_ecc_datapath;
  import secjtag_pkg::*;
  localparam int unsigned W = 192;
localparam int NV = 20;
localparam ecc_op_e v_op [NV] = '{OP_FADD, OP_FSUB, OP_FMUL, OP_FINV, OP_PADD, OP_PDBL, OP_FADD, OP_FSUB, OP_FMUL, OP_FINV, OP_PADD, OP_PDBL, OP_FADD, OP_FSUB, OP_FMUL, OP_FINV, OP_PADD, OP_PDBL, OP_FINV, OP_FINV};
localparam logic [191:0] v_x1 [NV] = '{192'h0c5c7fd0a6a3a4506513270e269e0d37f2a74de452e6b439,
  192'h1600a35a099950d836f675cc81e74ef5e8e25d940ed90476,
  192'hf28c105d1fb17c2390c192cfd3ac94af0f21ddb66cad4a27,
  192'h3898d190f9ebdacc0cb1e29c658cda1495e60af593bd04d0,
  192'h4993bc35d4a63a7cddb8241c80cd4fccc36ecbae07cf5725,
  192'ha57903de25d83641329ac7cf9f68c524fac3a2a58b90e20a,
  192'h7f15052434b9b5df9e7769b10f4205b4907a70c31012f038,
  192'h3f98e2774cbd87ad5c90a9587403e430ec66a78795e761d2,
  192'h57ee05cde00902c77ebff206867347214cdd2055930d6eb0,
  192'h5790f82ec1d3fcff2a3af4d46b0a18e8830e07bc1e398f11,
  192'h91a4e1e848f6c2ac89755894149e0549313d66e3a87dd73f,
  192'hf9c0b8cfcbee029b2ab252c6823fe9ff47938bc5d9395b1c,
  192'hb2715945795e8229451abd81f1d69ed617f5e837d70820ff,
  192'h72158370d269a9a5ae658f33fe3b890b93f448b3a5aa3c82,
  192'h9c6539382b0537e65affb2297631a992f0ce583505c6af08,
  192'heab477d26415479c65dc9f503f63af83bd0561e6211c70d0,
  192'h3bb3defb653fe4785a4265e21034b3c9de96be79ef352c20,
  192'hf14bf8aa712c750bf9ab65af26a94b61b0507104c0fd0569,
  192'h000000000000000000000000000000000000000000000001,
  192'h000000000000000000000000000000000000000000000000};
localparam logic [191:0] v_y1 [NV] = '{192'h000000000000000000000000000000000000000000000000,
  192'h000000000000000000000000000000000000000000000000,
  192'h000000000000000000000000000000000000000000000000,
  192'h6b4cb2424a23d5962217beaddbc496cb8e81973e0becd7b1,
  192'he8ee9052524a45c6771cede189e7e7e868964abe5487cb14,
  192'ha7296d76547a30455fa9e3d90e6d98bc716a6528052e8b29,
  192'h000000000000000000000000000000000000000000000000,
  192'h000000000000000000000000000000000000000000000000,
  192'h000000000000000000000000000000000000000000000000,
  192'hf646e1f40a097c976bf46c697d2caf82eeeacbe226e87556,
  192'haf3078550be96915e40189335fb0b29da858aebe4a14a2ff,
  192'hb86692539db9a3843fb74f9aaa3535a7ede9ffa504465d02,
  192'h000000000000000000000000000000000000000000000000,
  192'h000000000000000000000000000000000000000000000000,
  192'h000000000000000000000000000000000000000000000000,
  192'h66d2287672fdf2022a96fb1a14a0f9e77f1b103cdf1582b1,
  192'h379d2a098d8096cb88788984fa67bdfef279b7a3f325bbb5,
  192'hf76bd55e8a35488aa9f33fc8dc53d347c50fc5f067796752,
  192'h000000000000000000000000000000000000000000000001,
  192'h000000000000000000000000000000000000000000000005};
localparam logic [191:0] v_x2 [NV] = '{192'h9531985d5d9dc9f81818e811892f902bd23f0824128b2f34,
  192'h8d116ece1738f7d93d9c172411e20b8f6b0d549b6f03675b,
  192'h0fd630f1f29d0da9953f48f1a09f76b5a170b3383926305a,
  192'h000000000000000000000000000000000000000000000000,
  192'heac8560f65b5a8fa9a8675ecb9dff22203f26a6e8ca9e046,
  192'h000000000000000000000000000000000000000000000000,
  192'h7731af10506bf2efc6f877186d76b07e881ed162ae2eb155,
  192'h14f4733f3e7d1bfbc7a2ea20b2f14c942e05319acb5c7428,
  192'h12bd4acefaecbd389be4bcfc49b64a0872e6cc3ababced21,
  192'h000000000000000000000000000000000000000000000000,
  192'h9ad39ecf8424ce7dbf2c6fcd8131fb8339c44e3dac871178,
  192'h000000000000000000000000000000000000000000000000,
  192'h4f426dcbb394fb36bb2d420f0f88080b10a3d6b2aa05e11b,
  192'h58d5563dab2cd31ee315128862c33a4fb774eb5248db40b0,
  192'h49952399c4aaeac137dc76fb0f17a3007e62aa0a1df9fd79,
  192'h000000000000000000000000000000000000000000000000,
  192'h410f49a4e8045dc1af664473f9b2fa5d3f074cc61b349840,
  192'h000000000000000000000000000000000000000000000000,
  192'h000000000000000000000000000000000000000000000000,
  192'h000000000000000000000000000000000000000000000000};
localparam logic [191:0] v_y2 [NV] = '{192'h000000000000000000000000000000000000000000000000,
  192'h000000000000000000000000000000000000000000000000,
  192'h000000000000000000000000000000000000000000000000,
  192'h000000000000000000000000000000000000000000000000,
  192'h1b255d7b5943f4bcaf6f4108ce9bfbc14b7809d48a8cd027,
  192'h000000000000000000000000000000000000000000000000,
  192'h000000000000000000000000000000000000000000000000,
  192'h000000000000000000000000000000000000000000000000,
  192'h000000000000000000000000000000000000000000000000,
  192'h000000000000000000000000000000000000000000000000,
  192'h14ffa4364820182379fcb4f999365d1a41b56d76fb7f85d4,
  192'h000000000000000000000000000000000000000000000000,
  192'h000000000000000000000000000000000000000000000000,
  192'h000000000000000000000000000000000000000000000000,
  192'h000000000000000000000000000000000000000000000000,
  192'h000000000000000000000000000000000000000000000000,
  192'hcb70381d29bf65c8e3ae376f28b0a5c07171925ed17d2bfb,
  192'h000000000000000000000000000000000000000000000000,
  192'h000000000000000000000000000000000000000000000000,
  192'h000000000000000000000000000000000000000000000000};
localparam logic [191:0] v_m [NV] = '{192'hfffffffffffffffffffffffffffffffeffffffffffffffff,
  192'hffffffffffffffffffffffff99def836146bc9b1b4d22831,
  192'hfffffffffffffffffffffffffffffffeffffffffffffffff,
  192'hffffffffffffffffffffffff99def836146bc9b1b4d22831,
  192'hfffffffffffffffffffffffffffffffeffffffffffffffff,
  192'hfffffffffffffffffffffffffffffffeffffffffffffffff,
  192'hfffffffffffffffffffffffffffffffeffffffffffffffff,
  192'hffffffffffffffffffffffff99def836146bc9b1b4d22831,
  192'hfffffffffffffffffffffffffffffffeffffffffffffffff,
  192'hffffffffffffffffffffffff99def836146bc9b1b4d22831,
  192'hfffffffffffffffffffffffffffffffeffffffffffffffff,
  192'hfffffffffffffffffffffffffffffffeffffffffffffffff,
  192'hfffffffffffffffffffffffffffffffeffffffffffffffff,
  192'hffffffffffffffffffffffff99def836146bc9b1b4d22831,
  192'hfffffffffffffffffffffffffffffffeffffffffffffffff,
  192'hffffffffffffffffffffffff99def836146bc9b1b4d22831,
  192'hfffffffffffffffffffffffffffffffeffffffffffffffff,
  192'hfffffffffffffffffffffffffffffffeffffffffffffffff,
  192'hfffffffffffffffffffffffffffffffeffffffffffffffff,
  192'hfffffffffffffffffffffffffffffffeffffffffffffffff};
localparam logic [191:0] e_x3 [NV] = '{192'ha18e182e04416e487d2c0f1fafcd9d63c4e656086571e36d,
  192'h88ef348bf26058fef95a5ea809e43b9c9240d2aa54a7c54c,
  192'h6db6909f6bf276295c3bf16a1b6efaa740207ce5199b69d3,
  192'h9e16ec0f9fba450bf2aaecddd2cdadfff31b077241d8db01,
  192'h8448df43a3375c682b3f7eae0f61af624f9a5595f51b87c0,
  192'hd83d10f814eac76b4742780bc51233363143b3a6f33ff9fd,
  192'hf646b4348525a8cf656fe0c97cb8b63318994225be41a18d,
  192'h2aa46f380e406bb194edbf37c112979cbe6175ecca8aedaa,
  192'h0270fa0d132dc56cdb22d68bede47ccda864d00cec4610ca,
  192'h0144676279ac34ac8878b1961b3245111cd1634cd32b985e,
  192'he68b693f6a343f21322baffa19fcb88eab16233f11e39081,
  192'h2a7521a684d9dab37996060bf709063030ab037fa7d4814a,
  192'h01b3c7112cf37d600047ff91015ea6e22899beea810e021b,
  192'h19402d33273cd686cb507cab9b784ebbdc7f5d615ccefbd2,
  192'hb405e1140b09a3e26c9d7d128a5a26ec893fa8fc6cc89dca,
  192'h3178e3c4f8ef50d49d545aaf0d38eb5395c29c2ba2381d67,
  192'h0b4d6f5ed098a64bfb0ce322a7ffacb9f7236475aac0a248,
  192'h22cbb405b68154955e9c883ae2ea121a39cca8f75bf2278f,
  192'h000000000000000000000000000000000000000000000001,
  192'h000000000000000000000000000000000000000000000000};
localparam logic [191:0] e_y3 [NV] = '{192'h000000000000000000000000000000000000000000000000,
  192'h000000000000000000000000000000000000000000000000,
  192'h000000000000000000000000000000000000000000000000,
  192'h000000000000000000000000000000000000000000000000,
  192'h18af996c56a6e9b11e02660475ebd411d58986a2471939dc,
  192'h1d2d3800f8813b23d4e08ec78ecd0bbf4f807ef7732a0045,
  192'h000000000000000000000000000000000000000000000000,
  192'h000000000000000000000000000000000000000000000000,
  192'h000000000000000000000000000000000000000000000000,
  192'h000000000000000000000000000000000000000000000000,
  192'hd70afa16e2f0cc421551af800cc72fdd17a466f74de0d646,
  192'h2bee64be049bd1a4e2ef371753522f6bd689a80ddf9b65ee,
  192'h000000000000000000000000000000000000000000000000,
  192'h000000000000000000000000000000000000000000000000,
  192'h000000000000000000000000000000000000000000000000,
  192'h000000000000000000000000000000000000000000000000,
  192'h4dbf9cd8acf01fd9c273b07359e68416062a4b4bb8fd7ff9,
  192'h61810ba79fbaf5cd6a7178b5eb2f9ccfc1e599ec91cc7daf,
  192'h000000000000000000000000000000000000000000000000,
  192'h000000000000000000000000000000000000000000000000};
localparam bit e_err [NV] = '{0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1};
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  ecc_op_e op = OP_NOP;
  logic [W-1:0] x1 = '0, y1 = '0, x2 = '0, y2 = '0, m = '0;
  logic busy, done, err;
  logic [W-1:0] x3, y3;
  int checks = 0, failures = 0, cyc;

  always #5 clk = ~clk;

  ecc_datapath #(.W(W)) dut (.clk, .rst_n, .start, .op, .x1, .y1, .x2, .y2, .m,
                             .a(P192_A), .busy, .done, .err, .x3, .y3);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NV; i++) begin
      @(negedge clk);
      op = v_op[i]; x1 = v_x1[i]; y1 = v_y1[i]; x2 = v_x2[i]; y2 = v_y2[i]; m = v_m[i];
      start = 1'b1;
      @(negedge clk); start = 1'b0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      check(err == e_err[i], $sformatf("vector %0d err=%0d", i, err));
      if (!e_err[i]) begin
        check(x3 == e_x3[i], $sformatf("vector %0d op %s x3", i, op.name()));
        if (op == OP_PADD || op == OP_PDBL)
          check(y3 == e_y3[i], $sformatf("vector %0d op %s y3", i, op.name()));
      end
      // latency bounds: add/sub 1 step, mult W+2, division <= 2W+2
      unique case (op)
        OP_FADD, OP_FSUB: check(cyc <= 3, $sformatf("field add/sub took %0d cycles", cyc));
        OP_FMUL: check(cyc == W + 4, $sformatf("FieldMult took %0d cycles", cyc));
        OP_FINV: check(cyc <= 2*W + 5, $sformatf("FieldInv took %0d cycles", cyc));
        OP_PADD: begin
          check(cyc <= 5*W + 6, $sformatf("PointAdd took %0d cycles (bound 5W+6)", cyc));
          $display("PointAdd cycles %0d", cyc);
        end
        OP_PDBL: begin
          check(cyc <= 5*W + 24, $sformatf("PointDbl took %0d cycles", cyc));
          $display("PointDbl cycles %0d", cyc);
        end
        default: ;
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
