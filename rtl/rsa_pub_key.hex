9af99fffab5d2e80f9a23fecca2bcdc2dee58082386b97fd6015d20b5ca3b034c305ef1491d3368062198501259c26e58f8b11534bc8d7a918d9dcfbd075278d33743f7897a0f0282a11eff344d567d36b3277e4eb0e891d361e5d889579d077cbd47cf97a24edb4bac2e408de697e08a6701e1e301f47a1cb51a0875af0b497
90d0f3344c95c04da4ddf9d9f125918113360f07781396991b96aba82dc36a5631864bf48ae50b8738add1d2467929d465973a33f311c3a8276f07df9c102bfc41ae3b8d26d2d87c37c1bed44fd0f66607e4b856592c2b270e1e279926ea97458ce4e725a9e4469ce536c08e65827e6431c22f960aad5ae34075e40ecb4a3429
